// Traffic-light controller for a T intersection.
//
// The main road shows green by default. A sensor in the cross street asks
// for the cross green; the controller first pauses for delay d1 (a car
// turning right on red may clear the sensor, which cancels the request),
// then shows thru yellow for d2, thru red with cross green for d3 and cross
// yellow for d4, and returns to thru green. The delays come from four dials
// and count clock cycles, so their meaning depends on the clock frequency.
//
// Built from the three parts of the notes' block diagram: the state machine
// (tl_controller), one timer counter (tl_timer) enabled by the controller's
// ten and cleared whenever it is not enabled, and four equality comparators
// (tl_comparator) of the timer against d1..d4. A timed state whose dial is
// dN lasts dN+1 clock cycles; pause needs the sensor high throughout.
//
// Interface: clk, reset (synchronous), sensor, d1..d4 (WORD_SIZE bits); the
// six light outputs, plus state and timer for observation. The sensor is
// used as given: pass an asynchronous sensor through the synchronizer first.
module traffic_light
  import seq_pkg::*;
#(
  parameter int WIDTH = WORD_SIZE
) (
  input  logic             clk,
  input  logic             reset,
  input  logic             sensor,
  input  logic [WIDTH-1:0] d1,
  input  logic [WIDTH-1:0] d2,
  input  logic [WIDTH-1:0] d3,
  input  logic [WIDTH-1:0] d4,
  output logic             t_g,
  output logic             t_y,
  output logic             t_r,
  output logic             x_g,
  output logic             x_y,
  output logic             x_r,
  output tl_state_t        state,
  output logic [WIDTH-1:0] timer
);
  logic       ten;
  logic [3:0] dmatch;

  tl_timer #(.WIDTH(WIDTH)) u_timer (.clk, .en(ten), .count(timer));

  tl_comparator #(.WIDTH(WIDTH)) u_cmp1 (.a(timer), .b(d1), .eq(dmatch[0]));
  tl_comparator #(.WIDTH(WIDTH)) u_cmp2 (.a(timer), .b(d2), .eq(dmatch[1]));
  tl_comparator #(.WIDTH(WIDTH)) u_cmp3 (.a(timer), .b(d3), .eq(dmatch[2]));
  tl_comparator #(.WIDTH(WIDTH)) u_cmp4 (.a(timer), .b(d4), .eq(dmatch[3]));

  tl_controller u_ctrl (
    .clk, .reset, .s(sensor), .d(dmatch), .ten,
    .t_g, .t_y, .t_r, .x_g, .x_y, .x_r, .state
  );
endmodule
