// State machine of the traffic-light controller.
//
// Five states in a three-bit register s2s1s0: 000 thruG (through green,
// cross red), 001 pause (still thru green; waits to see whether the cross
// car turns right on red and leaves), 010 thruY, 011 thruR (cross green) and
// 100 crossY. Inputs are the sensor s and the comparator results d[0..3]
// (d1..d4: the timer equals the dial for pause, thruY, thruR, crossY).
// thruG waits for the sensor; pause returns to thruG if the sensor drops
// and moves to thruY when d1 is reached; the other states advance when their
// delay is reached, crossY back to thruG. The timer enable ten is high while
// a state keeps waiting, so the timer counts 0..dN and each timed state lasts
// dN+1 cycles.
// The next state, lights and ten come from sum-of-products equations on the
// state bits, exactly as derived from the state table in the notes. The
// unused codes 101..111 follow those equations too. reset (synchronous, not
// in the equations) returns to thruG.
// Interface: clk, reset, s, d[3:0] (d[0] = d1); ten, the six lights and the
// state code. Lights and ten are functions of the current state (and inputs
// for ten).
module tl_controller
  import seq_pkg::*;
(
  input  logic       clk,
  input  logic       reset,
  input  logic       s,
  input  logic [3:0] d,
  output logic       ten,
  output logic       t_g,
  output logic       t_y,
  output logic       t_r,
  output logic       x_g,
  output logic       x_y,
  output logic       x_r,
  output tl_state_t  state
);
  logic s2, s1, s0, d1, d2, d3, d4;
  logic [2:0] ns;

  always_comb begin
    {s2, s1, s0} = state;
    {d4, d3, d2, d1} = d;
    // Output equations.
    t_g = !s2 && !s1;
    t_y = s1 && !s0;
    t_r = !(t_g || t_y);
    x_g = s1 && s0;
    x_y = s2;
    x_r = !(x_g || x_y);
    ten = (!s1 && s0 && s && !d1) || (s1 && !s0 && !d2) ||
          (s1 && s0 && !d3) || (s2 && !d4);
    // Next-state equations.
    ns[2] = (s1 && s0 && d3) || (s2 && !d4);
    ns[1] = (!s1 && s0 && s && d1) || (s1 && !s0) || (s1 && s0 && !d3);
    ns[0] = (!s2 && !s1 && !s0 && s) || (!s1 && s0 && s && !d1) ||
            (s1 && !s0 && d2) || (s1 && s0 && !d3);
  end

  always_ff @(posedge clk) begin
    if (reset) state <= THRU_G;
    else       state <= tl_state_t'(ns);
  end
endmodule
