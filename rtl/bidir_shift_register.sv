// Bidirectional shift register with parallel load.
//
// Nothing changes unless ld is high at the rising clock edge. With ld high:
// sl shifts left (bit 0 takes d[0] as the serial input), otherwise sr
// shifts right (bit WIDTH-1 takes d[WIDTH-1]), otherwise the whole of d is
// loaded. sl has priority over sr.
// Interface: clk, ld, sl, sr, d[WIDTH-1:0]; q[WIDTH-1:0], one edge after the
// operation. Operation, priorities, serial-input bits and the width of 4
// follow the notes; there is no reset, as in the notes.
module bidir_shift_register #(
  parameter int WIDTH = 4
) (
  input  logic             clk,
  input  logic             ld,
  input  logic             sl,
  input  logic             sr,
  input  logic [WIDTH-1:0] d,
  output logic [WIDTH-1:0] q
);
  logic [WIDTH-1:0] q_next;

  always_comb begin
    q_next = q;
    if (ld) begin
      if (sl)      q_next = {q[WIDTH-2:0], d[0]};
      else if (sr) q_next = {d[WIDTH-1], q[WIDTH-1:1]};
      else         q_next = d;
    end
  end

  always_ff @(posedge clk) q <= q_next;
endmodule
