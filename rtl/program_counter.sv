// Four-bit program counter.
//
// Each bit is a flip-flop fed through three stages: an increment stage (XOR
// of the bit with a carry from an AND chain whose input is inc), a 2:1 input
// multiplexer that picks the external value d when ld is high, and a reset
// stage that ANDs the result with not-reset. So at each rising edge:
// reset high gives 0, else ld high loads d, else inc high adds one
// (wrapping), else the value holds. The count drives an address bus
// through tri-state buffers enabled by en_a.
// Interface: clk, reset, ld, inc, en_a, d[WIDTH-1:0]; q[WIDTH-1:0] is the
// register value and q_oe the buffer enable. This design does not model
// the tri-state buffers themselves: q_oe is brought out so the bus owner
// can build them. Priorities, reset and width follow the notes' schematic.
module program_counter #(
  parameter int WIDTH = 4
) (
  input  logic             clk,
  input  logic             reset,
  input  logic             ld,
  input  logic             inc,
  input  logic             en_a,
  input  logic [WIDTH-1:0] d,
  output logic [WIDTH-1:0] q,
  output logic             q_oe
);
  logic [WIDTH-1:0] carry, incremented, muxed;

  // Increment logic: ripple AND chain started by inc, XOR per bit.
  assign carry       = {carry[WIDTH-2:0] & q[WIDTH-2:0], inc};
  assign incremented = q ^ carry;
  // Input multiplexer, then reset logic.
  assign muxed       = ld ? d : incremented;

  always_ff @(posedge clk) q <= muxed & {WIDTH{~reset}};

  assign q_oe = en_a;
endmodule
