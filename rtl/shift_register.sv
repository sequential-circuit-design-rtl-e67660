// Serial-in serial-out shift register with parallel outputs.
//
// WIDTH flip-flops in a chain, each behind a 2:1 multiplexer. When shift is
// low at a rising clock edge the serial input d enters bit 0 and every bit
// moves one place towards the serial output q (bit WIDTH-1); when shift is
// high every flip-flop reloads its own value. par_q shows all bits, for
// serial-to-parallel conversion.
// Interface: clk, shift (active low), d (serial in); q (serial out),
// par_q[WIDTH-1:0]. A bit entering at d appears at q WIDTH shifts later.
// The active-low shift control and the width of 4 follow the notes; the
// parallel output port is this design's addition for the serial-to-parallel
// use the notes mention. No reset, as in the notes.
module shift_register #(
  parameter int WIDTH = 4
) (
  input  logic             clk,
  input  logic             shift,
  input  logic             d,
  output logic             q,
  output logic [WIDTH-1:0] par_q
);
  logic [WIDTH-1:0] stages;

  always_ff @(posedge clk) begin
    if (!shift) stages <= {stages[WIDTH-2:0], d};
  end

  assign q     = stages[WIDTH-1];
  assign par_q = stages;
endmodule
