// Up-down counter with parallel load.
//
// At each rising clock edge: ld high loads d; otherwise cnt high counts one
// step up when up is high or down when up is low (wrapping modulo
// 2**WIDTH); otherwise the value holds. Load has priority over counting.
// Interface: clk, ld, cnt, up, d[WIDTH-1:0]; q[WIDTH-1:0]. Operation and
// width 4 follow the notes; the adder is left to synthesis. No reset, as in
// the notes: load a value first.
module updown_counter #(
  parameter int WIDTH = 4
) (
  input  logic             clk,
  input  logic             ld,
  input  logic             cnt,
  input  logic             up,
  input  logic [WIDTH-1:0] d,
  output logic [WIDTH-1:0] q
);
  always_ff @(posedge clk) begin
    if (ld)       q <= d;
    else if (cnt) q <= up ? q + WIDTH'(1) : q - WIDTH'(1);
  end
endmodule
