// Parallel-load register without a gated clock.
//
// Every bit has a 2:1 multiplexer in front of its flip-flop: when ld is high
// at a rising clock edge the register takes d, otherwise the multiplexer
// feeds the flip-flop its own output so the old value is kept. The clock
// reaches every flip-flop ungated, which keeps clock skew low.
// Interface: clk, ld, d[WIDTH-1:0] in; q[WIDTH-1:0] out. q changes one clock
// edge after a load. Width 4 follows the notes; there is no reset because
// the notes' register has none.
module load_register #(
  parameter int WIDTH = 4
) (
  input  logic             clk,
  input  logic             ld,
  input  logic [WIDTH-1:0] d,
  output logic [WIDTH-1:0] q
);
  logic [WIDTH-1:0] q_next;

  // Input multiplexer: new data when loading, feedback otherwise.
  always_comb q_next = ld ? d : q;

  always_ff @(posedge clk) q <= q_next;
endmodule
