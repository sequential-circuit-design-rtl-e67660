// Delay timer of the traffic-light controller.
//
// An up-counter that adds one at every rising edge while en is high and is
// set to zero at every edge while en is low. The controller holds en high
// while it waits in a state and drops it for the one cycle in which it
// leaves, so every state starts with the timer at zero.
// Interface: clk, en; count[WIDTH-1:0]. Width 4 and the clear-when-idle
// rule follow the notes; the count wraps at 2**WIDTH.
module tl_timer #(
  parameter int WIDTH = 4
) (
  input  logic             clk,
  input  logic             en,
  output logic [WIDTH-1:0] count
);
  always_ff @(posedge clk) count <= en ? count + 1'b1 : '0;
endmodule
