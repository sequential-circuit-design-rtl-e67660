// End-to-end test of seq_top at its default sizes.
//
// Runs every design of the collection through the top's ports, each with
// its own short scenario and its own expected values, and counts how often
// each named mechanism happened: priority-queue insert, delete, refused
// insert when full and refused delete when empty; traffic-light pause
// cancelled by the sensor and a full light cycle; data-queue simultaneous
// enqueue/dequeue, refused enqueue when full and emptying; program-counter
// reset, load, increment and wrap; register load and hold; serial shift and
// hold; left shift, right shift and parallel load; counter carry-out in
// both counters; up and down counting; Gray-code wrap; synchronizer delay.
// A mechanism that never happened counts as a failure.
module tb_seq_top;
  import seq_pkg::*;
  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic       pq_reset, pq_insert, pq_delete, pq_busy, pq_empty, pq_full;
  logic [3:0] pq_key, pq_value, pq_small_value;
  logic       tl_reset, tl_sensor, tl_t_g, tl_t_y, tl_t_r, tl_x_g, tl_x_y, tl_x_r;
  logic [3:0] tl_d1, tl_d2, tl_d3, tl_d4, tl_timer;
  tl_state_t  tl_state;
  logic       dq_reset, dq_enq, dq_deq, dq_empty, dq_full;
  logic [7:0] dq_data_in, dq_data_out;
  logic       pc_reset, pc_ld, pc_inc, pc_en_a, pc_q_oe;
  logic [3:0] pc_d, pc_q;
  logic       lr_ld;
  logic [3:0] lr_d, lr_q;
  logic       sh_shift, sh_d, sh_q;
  logic [3:0] sh_par_q;
  logic       bs_ld, bs_sl, bs_sr;
  logic [3:0] bs_d, bs_q;
  logic       rc_en, la_en;
  logic [3:0] rc_q, rc_c, la_q, la_c;
  logic       ud_ld, ud_cnt, ud_up;
  logic [3:0] ud_d, ud_q;
  logic       gc_clr, gc_cnt;
  logic [2:0] gc_q;
  logic       sy_async_in, sy_sync_out;

  seq_top dut (.*);

  int checks = 0, failures = 0;
  typedef enum int {
    M_PQ_INS, M_PQ_DEL, M_PQ_FULL, M_PQ_EMPTY, M_TL_CANCEL, M_TL_CYCLE, M_DQ_BOTH, M_DQ_FULL,
    M_DQ_EMPTY, M_PC_RESET, M_PC_LOAD, M_PC_WRAP, M_LR_LOAD, M_LR_HOLD, M_SH_SHIFT, M_SH_HOLD,
    M_BS_LEFT, M_BS_RIGHT, M_BS_LOAD, M_RC_CARRY, M_LA_CARRY, M_UD_UP, M_UD_DOWN, M_GC_WRAP,
    M_SY_DELAY, M_COUNT
  } mech_t;
  int mech [M_COUNT];

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  task automatic tick(input int n = 1);
    repeat (n) begin @(posedge clk); #1; end
  endtask

  initial begin
    #2000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---------------------------------------------------------------- init
  initial begin
    {pq_insert, pq_delete, pq_key, pq_value} = '0;
    {tl_sensor, tl_d1, tl_d2, tl_d3, tl_d4} = '0;
    {dq_enq, dq_deq, dq_data_in} = '0;
    {pc_ld, pc_inc, pc_en_a, pc_d} = '0;
    {lr_ld, lr_d, sh_shift, sh_d, bs_ld, bs_sl, bs_sr, bs_d} = '0;
    {rc_en, la_en, ud_ld, ud_cnt, ud_up, ud_d, gc_clr, gc_cnt, sy_async_in} = '0;
    {pq_reset, tl_reset, dq_reset, pc_reset} = '1;
    sh_shift = 1;
  end

  // Scenario run in sequence; each block is idle while another is tested.
  initial begin
    tick(2);
    {pq_reset, tl_reset, dq_reset, pc_reset} = '0;

    // ------------------------------------------------ priority queue
    // Insert keys 9,2,14,5,11,0,7,3 (values = key ^ 4'hA), then one more.
    begin
      static logic [3:0] keys [8] = '{9, 2, 14, 5, 11, 0, 7, 3};
      static logic [3:0] sorted [8] = '{0, 2, 3, 5, 7, 9, 11, 14};
      check(pq_empty && !pq_full, "pq empty after reset");
      pq_delete = 1; tick(); pq_delete = 0;
      check(!pq_busy && pq_empty, "pq delete refused when empty");
      if (!pq_busy) mech[M_PQ_EMPTY]++;
      foreach (keys[i]) begin
        pq_insert = 1; pq_key = keys[i]; pq_value = keys[i] ^ 4'hA;
        tick(); pq_insert = 0;
        check(pq_busy, "pq busy in the second insert cycle");
        tick();
        mech[M_PQ_INS]++;
      end
      check(pq_full, "pq full after eight inserts");
      pq_insert = 1; pq_key = 1; tick(); pq_insert = 0;
      check(!pq_busy && pq_full, "pq insert refused when full");
      if (!pq_busy) mech[M_PQ_FULL]++;
      foreach (sorted[i]) begin
        check(pq_small_value == (sorted[i] ^ 4'hA), $sformatf("pq min %0d", i));
        pq_delete = 1; tick(); pq_delete = 0; tick();
        mech[M_PQ_DEL]++;
      end
      check(pq_empty && pq_small_value == 0, "pq empty after eight deletes");
    end

    // ------------------------------------------------ traffic light
    tl_d1 = 7; tl_d2 = 5; tl_d3 = 4; tl_d4 = 12;
    tick(2);
    check(tl_t_g && tl_x_r, "tl thru green by default");
    tl_sensor = 1; tick(3); tl_sensor = 0; tick();
    check(tl_state == THRU_G, "tl pause cancelled");
    if (tl_state == THRU_G) mech[M_TL_CANCEL]++;
    tl_sensor = 1; tick();
    check(tl_state == PAUSE, "tl pause");
    tick(8);
    check(tl_state == THRU_Y && tl_t_y && tl_x_r, "tl thru yellow after d1+1 cycles");
    tick(6);
    check(tl_state == THRU_R && tl_t_r && tl_x_g, "tl cross green after d2+1 cycles");
    tl_sensor = 0;
    tick(5);
    check(tl_state == CROSS_Y && tl_t_r && tl_x_y, "tl cross yellow after d3+1 cycles");
    tick(13);
    check(tl_state == THRU_G && tl_t_g && tl_x_r, "tl thru green after d4+1 cycles");
    if (tl_state == THRU_G) mech[M_TL_CYCLE]++;

    // ------------------------------------------------ data queue
    check(dq_empty, "dq empty after reset");
    dq_enq = 1; dq_deq = 1; dq_data_in = 8'd50; tick();
    check(!dq_empty && dq_data_out == 50, "dq enq+deq on empty only enqueues");
    mech[M_DQ_BOTH]++;
    dq_deq = 0;
    for (int i = 1; i < 16; i++) begin dq_data_in = 8'(50 + i); tick(); end
    check(dq_full, "dq full after 16 words");
    dq_data_in = 8'd99; tick();
    check(dq_full && dq_data_out == 50, "dq enqueue refused when full");
    if (dq_full) mech[M_DQ_FULL]++;
    dq_deq = 1; dq_data_in = 8'd200; tick();
    check(dq_full && dq_data_out == 51, "dq enq+deq when full keeps it full");
    mech[M_DQ_BOTH]++;
    dq_enq = 0;
    for (int i = 0; i < 16; i++) begin
      check(dq_data_out == ((i == 15) ? 8'd200 : 8'(51 + i)), $sformatf("dq order %0d", i));
      tick();
    end
    check(dq_empty, "dq empty after draining");
    if (dq_empty) mech[M_DQ_EMPTY]++;
    dq_deq = 0;

    // ------------------------------------------------ program counter
    pc_en_a = 1; pc_ld = 1; pc_d = 4'hD; tick(); pc_ld = 0;
    check(pc_q == 4'hD && pc_q_oe, "pc load");
    mech[M_PC_LOAD]++;
    pc_inc = 1; tick(3);
    check(pc_q == 4'h0, "pc increment wraps");
    mech[M_PC_WRAP]++;
    pc_reset = 1; tick(); pc_reset = 0; pc_inc = 0;
    check(pc_q == 4'h0, "pc reset");
    mech[M_PC_RESET]++;

    // ------------------------------------------------ registers
    lr_ld = 1; lr_d = 4'h6; tick(); lr_ld = 0; lr_d = 4'h1; tick();
    check(lr_q == 4'h6, "lr load then hold");
    mech[M_LR_LOAD]++; mech[M_LR_HOLD]++;

    sh_shift = 0;
    for (int i = 3; i >= 0; i--) begin sh_d = 4'b1011 >> i & 4'b0001 ? 1'b1 : 1'b0; tick(); end
    check(sh_par_q == 4'b1011 && sh_q == 1'b1, "shift register serial-to-parallel");
    mech[M_SH_SHIFT]++;
    sh_shift = 1; sh_d = 0; tick(2);
    check(sh_par_q == 4'b1011, "shift register holds when shift is high");
    mech[M_SH_HOLD]++;

    bs_ld = 1; bs_d = 4'b1001; tick();
    check(bs_q == 4'b1001, "bidir load"); mech[M_BS_LOAD]++;
    bs_sl = 1; bs_d = 4'b0000; tick(); bs_sl = 0;
    check(bs_q == 4'b0010, "bidir left"); mech[M_BS_LEFT]++;
    bs_sr = 1; bs_d = 4'b1000; tick(); bs_sr = 0; bs_ld = 0;
    check(bs_q == 4'b1001, "bidir right"); mech[M_BS_RIGHT]++;

    // ------------------------------------------------ counters
    begin
      logic [3:0] r0, l0;
      r0 = rc_q; l0 = la_q;
      rc_en = 1; la_en = 1;
      for (int i = 0; i < 16; i++) begin
        #1;
        if (rc_c[3]) mech[M_RC_CARRY]++;
        if (la_c[3]) mech[M_LA_CARRY]++;
        check(rc_c[3] == (rc_q == 4'hF) && la_c[3] == (la_q == 4'hF), "carry out at 15");
        tick();
      end
      rc_en = 0; la_en = 0;
      check(rc_q == r0 && la_q == l0, "counters wrap after 16 steps");
    end

    ud_ld = 1; ud_d = 4'h2; tick(); ud_ld = 0;
    ud_cnt = 1; ud_up = 0; tick(3);
    check(ud_q == 4'hF, "updown counts down through zero"); mech[M_UD_DOWN]++;
    ud_up = 1; tick(5);
    check(ud_q == 4'h4, "updown counts up through 15"); mech[M_UD_UP]++;
    ud_cnt = 0;

    gc_clr = 1; tick(); gc_clr = 0; gc_cnt = 1;
    tick(7);
    check(gc_q == 3'b100, "gray counter reaches 100");
    tick();
    check(gc_q == 3'b000, "gray counter wraps");
    mech[M_GC_WRAP]++;
    gc_cnt = 0;

    sy_async_in = 1; tick();
    check(sy_sync_out == 0, "synchronizer first stage only");
    tick();
    check(sy_sync_out == 1, "synchronizer output after two edges");
    mech[M_SY_DELAY]++;

    for (int m = 0; m < M_COUNT; m++) begin
      checks++;
      if (mech[m] == 0) begin failures++; $display("FAIL mechanism %s never happened", mech_t'(m)); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
