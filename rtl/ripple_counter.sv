// Synchronous counter with a ripple carry chain.
//
// All flip-flops share one clock. Bit i toggles when its carry-in is high;
// carry-in of bit 0 is the enable en, and the carry out of bit i is
// c[i] = q[i] & carry-in(i), so a carry ripples through one AND gate per
// bit. The chain must settle within one clock period, which limits wide
// counters. c[WIDTH-1] is high for the one state in which the counter wraps.
// Interface: clk, en; q[WIDTH-1:0], c[WIDTH-1:0] (the carries C0..C3 of
// the notes' schematic). Counting advances one step per enabled edge.
// Structure and width follow the notes; the notes give no reset, so the
// counter starts from whatever value its flip-flops power up with.
module ripple_counter #(
  parameter int WIDTH = 4
) (
  input  logic             clk,
  input  logic             en,
  output logic [WIDTH-1:0] q,
  output logic [WIDTH-1:0] c
);
  logic [WIDTH-1:0] cin;

  // Carry chain: each stage ANDs its bit with the carry of the stage below.
  assign cin = {c[WIDTH-2:0], en};
  assign c   = q & cin;

  always_ff @(posedge clk) q <= q ^ cin;
endmodule
