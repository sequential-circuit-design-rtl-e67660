// Synchronous counter with look-ahead carries.
//
// Same function as the ripple-carry counter, but each carry is formed
// directly as the AND of the enable and all lower bits,
// c[i] = en & q[0] & ... & q[i], so no carry waits for another. The cost is
// a gate of i+2 inputs per bit and a fan-out on the low bits that grows with
// the width.
// Interface: clk, en; q[WIDTH-1:0], c[WIDTH-1:0]. One step per enabled edge.
// Structure and width follow the notes; no reset, as in the notes.
module cla_counter #(
  parameter int WIDTH = 4
) (
  input  logic             clk,
  input  logic             en,
  output logic [WIDTH-1:0] q,
  output logic [WIDTH-1:0] c
);
  logic [WIDTH-1:0] cin;

  always_comb begin
    for (int i = 0; i < WIDTH; i++) begin
      logic [WIDTH:0] terms;
      // AND of en and q[0..i]; unused upper terms are forced to 1.
      terms = {~{WIDTH{1'b0}}, en};
      for (int j = 0; j <= i; j++) terms[j+1] = q[j];
      c[i] = &terms;
    end
    cin[0] = en;
    for (int i = 1; i < WIDTH; i++) cin[i] = c[i-1];
  end

  always_ff @(posedge clk) q <= q ^ cin;
endmodule
