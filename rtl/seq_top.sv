// Collection top: every sequential design of the set, side by side.
//
// The designs do not interact; each keeps its own ports, prefixed with the
// design's name, and all share one clock. Contents: the two-row priority
// queue (pq_), the T-intersection traffic-light controller (tl_), the FIFO
// data queue (dq_), the four-bit program counter (pc_), the parallel-load
// register (lr_), the serial shift register (sh_), the bidirectional shift
// register (bs_), the ripple-carry and look-ahead counters (rc_, la_), the
// up-down counter (ud_), the Gray-code counter (gc_) and the two-flip-flop
// synchronizer (sy_). The delay dials of the traffic light are plain inputs
// (tl_d1..tl_d4). Timing of each output is that of its design.
module seq_top
  import seq_pkg::*;
(
  input  logic                 clk,
  // Priority queue
  input  logic                 pq_reset,
  input  logic                 pq_insert,
  input  logic                 pq_delete,
  input  logic [WORD_SIZE-1:0] pq_key,
  input  logic [WORD_SIZE-1:0] pq_value,
  output logic [WORD_SIZE-1:0] pq_small_value,
  output logic                 pq_busy,
  output logic                 pq_empty,
  output logic                 pq_full,
  // Traffic-light controller
  input  logic                 tl_reset,
  input  logic                 tl_sensor,
  input  logic [WORD_SIZE-1:0] tl_d1,
  input  logic [WORD_SIZE-1:0] tl_d2,
  input  logic [WORD_SIZE-1:0] tl_d3,
  input  logic [WORD_SIZE-1:0] tl_d4,
  output logic                 tl_t_g,
  output logic                 tl_t_y,
  output logic                 tl_t_r,
  output logic                 tl_x_g,
  output logic                 tl_x_y,
  output logic                 tl_x_r,
  output tl_state_t            tl_state,
  output logic [WORD_SIZE-1:0] tl_timer,
  // Data queue
  input  logic                 dq_reset,
  input  logic                 dq_enq,
  input  logic                 dq_deq,
  input  logic [7:0]           dq_data_in,
  output logic [7:0]           dq_data_out,
  output logic                 dq_empty,
  output logic                 dq_full,
  // Program counter
  input  logic                 pc_reset,
  input  logic                 pc_ld,
  input  logic                 pc_inc,
  input  logic                 pc_en_a,
  input  logic [3:0]           pc_d,
  output logic [3:0]           pc_q,
  output logic                 pc_q_oe,
  // Parallel-load register
  input  logic                 lr_ld,
  input  logic [3:0]           lr_d,
  output logic [3:0]           lr_q,
  // Serial shift register
  input  logic                 sh_shift,
  input  logic                 sh_d,
  output logic                 sh_q,
  output logic [3:0]           sh_par_q,
  // Bidirectional shift register
  input  logic                 bs_ld,
  input  logic                 bs_sl,
  input  logic                 bs_sr,
  input  logic [3:0]           bs_d,
  output logic [3:0]           bs_q,
  // Ripple-carry counter
  input  logic                 rc_en,
  output logic [3:0]           rc_q,
  output logic [3:0]           rc_c,
  // Look-ahead counter
  input  logic                 la_en,
  output logic [3:0]           la_q,
  output logic [3:0]           la_c,
  // Up-down counter
  input  logic                 ud_ld,
  input  logic                 ud_cnt,
  input  logic                 ud_up,
  input  logic [3:0]           ud_d,
  output logic [3:0]           ud_q,
  // Gray-code counter
  input  logic                 gc_clr,
  input  logic                 gc_cnt,
  output logic [2:0]           gc_q,
  // Synchronizer
  input  logic                 sy_async_in,
  output logic                 sy_sync_out
);
  pri_queue u_pri_queue (
    .clk, .reset(pq_reset), .insert(pq_insert), .delete_min(pq_delete),
    .key(pq_key), .value(pq_value), .small_value(pq_small_value),
    .busy(pq_busy), .empty(pq_empty), .full(pq_full)
  );

  traffic_light u_traffic_light (
    .clk, .reset(tl_reset), .sensor(tl_sensor),
    .d1(tl_d1), .d2(tl_d2), .d3(tl_d3), .d4(tl_d4),
    .t_g(tl_t_g), .t_y(tl_t_y), .t_r(tl_t_r),
    .x_g(tl_x_g), .x_y(tl_x_y), .x_r(tl_x_r),
    .state(tl_state), .timer(tl_timer)
  );

  data_queue u_data_queue (
    .clk, .reset(dq_reset), .enq(dq_enq), .deq(dq_deq),
    .data_in(dq_data_in), .data_out(dq_data_out),
    .empty(dq_empty), .full(dq_full)
  );

  program_counter u_program_counter (
    .clk, .reset(pc_reset), .ld(pc_ld), .inc(pc_inc), .en_a(pc_en_a),
    .d(pc_d), .q(pc_q), .q_oe(pc_q_oe)
  );

  load_register u_load_register (.clk, .ld(lr_ld), .d(lr_d), .q(lr_q));

  shift_register u_shift_register (
    .clk, .shift(sh_shift), .d(sh_d), .q(sh_q), .par_q(sh_par_q)
  );

  bidir_shift_register u_bidir_shift_register (
    .clk, .ld(bs_ld), .sl(bs_sl), .sr(bs_sr), .d(bs_d), .q(bs_q)
  );

  ripple_counter u_ripple_counter (.clk, .en(rc_en), .q(rc_q), .c(rc_c));

  cla_counter u_cla_counter (.clk, .en(la_en), .q(la_q), .c(la_c));

  updown_counter u_updown_counter (
    .clk, .ld(ud_ld), .cnt(ud_cnt), .up(ud_up), .d(ud_d), .q(ud_q)
  );

  gray_counter u_gray_counter (.clk, .clr(gc_clr), .cnt(gc_cnt), .q(gc_q));

  synchronizer u_synchronizer (
    .clk, .async_in(sy_async_in), .sync_out(sy_sync_out)
  );
endmodule
