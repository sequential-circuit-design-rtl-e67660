// Equality comparator for the traffic-light controller.
//
// Compares the delay timer with one dial setting and reports equality; the
// controller uses it to learn that the current state's delay has elapsed.
// Interface: a, b (WIDTH bits each); eq, purely combinational. The
// comparator itself follows the notes' block diagram.
module tl_comparator #(
  parameter int WIDTH = 4
) (
  input  logic [WIDTH-1:0] a,
  input  logic [WIDTH-1:0] b,
  output logic             eq
);
  // Bitwise XNOR, then AND of all bits.
  assign eq = &(~(a ^ b));
endmodule
