// Self-checking test of traffic_light.
//
// A behavioural reference (state name plus a timer that counts up to the
// dial of the current state, then restarts at zero in the next state) runs
// beside the design; state, timer and all six lights are compared every
// cycle. Part 1 uses dials 7, 5, 4 and 12 with a short sensor pulse that is
// withdrawn during the pause, then a held sensor; it checks that the pause
// is cancelled and that each timed state lasts its dial value plus one
// cycle. Part 2 uses random dials and a random sensor.
module tb_traffic_light;
  import seq_pkg::*;
  logic clk = 1'b0;
  logic reset, sensor, t_g, t_y, t_r, x_g, x_y, x_r;
  logic [3:0] d1, d2, d3, d4, timer, m_timer;
  tl_state_t state, m_state, prev_state;
  int checks = 0, failures = 0, n_cancel = 0, n_cycles_done = 0, run_len = 0;

  traffic_light dut (.clk, .reset, .sensor, .d1, .d2, .d3, .d4,
                     .t_g, .t_y, .t_r, .x_g, .x_y, .x_r, .state, .timer);

  always #5 clk = ~clk;

  initial begin
    #400000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Reference model, advanced at every rising edge.
  always @(posedge clk) begin
    if (reset) begin
      m_state <= THRU_G; m_timer <= '0;
    end else begin
      case (m_state)
        THRU_G: if (sensor) m_state <= PAUSE;
        PAUSE:
          if (!sensor) begin m_state <= THRU_G; m_timer <= '0; n_cancel <= n_cancel + 1; end
          else if (m_timer != d1) m_timer <= m_timer + 1'b1;
          else begin m_state <= THRU_Y; m_timer <= '0; end
        THRU_Y: if (m_timer != d2) m_timer <= m_timer + 1'b1;
                else begin m_state <= THRU_R; m_timer <= '0; end
        THRU_R: if (m_timer != d3) m_timer <= m_timer + 1'b1;
                else begin m_state <= CROSS_Y; m_timer <= '0; end
        default: if (m_timer != d4) m_timer <= m_timer + 1'b1;
                 else begin m_state <= THRU_G; m_timer <= '0; n_cycles_done <= n_cycles_done + 1; end
      endcase
    end
  end

  function automatic logic [5:0] lights_of(input tl_state_t st);
    case (st)
      THRU_G, PAUSE: return 6'b100_001;
      THRU_Y:        return 6'b010_001;
      THRU_R:        return 6'b001_100;
      default:       return 6'b001_010;
    endcase
  endfunction

  // Compare every cycle and measure how long each state lasts.
  int dur_expect;
  always @(negedge clk) begin
    if (!reset) begin
      checks++;
      if (state !== m_state || {t_g, t_y, t_r, x_g, x_y, x_r} !== lights_of(m_state) ||
          (state != THRU_G && timer !== m_timer)) begin
        failures++;
        $display("FAIL %0t state=%s/%s timer=%0d/%0d lights=%b", $time, state.name(),
                 m_state.name(), timer, m_timer, {t_g, t_y, t_r, x_g, x_y, x_r});
      end
      if (state == prev_state) run_len++;
      else begin
        // A timed state that ran to completion lasted its dial value + 1.
        case (prev_state)
          THRU_Y:  dur_expect = d2 + 1;
          THRU_R:  dur_expect = d3 + 1;
          CROSS_Y: dur_expect = d4 + 1;
          PAUSE:   dur_expect = (state == THRU_Y) ? d1 + 1 : run_len;
          default: dur_expect = run_len;
        endcase
        checks++;
        if (run_len != dur_expect) begin
          failures++;
          $display("FAIL %s lasted %0d cycles, expected %0d", prev_state.name(), run_len, dur_expect);
        end
        run_len = 1;
      end
      prev_state = state;
    end else begin
      run_len = 1;
      prev_state = THRU_G;
    end
  end

  task automatic wait_cycles(input int n);
    repeat (n) @(negedge clk);
  endtask

  initial begin
    reset = 1; sensor = 0; d1 = 7; d2 = 5; d3 = 4; d4 = 12;
    wait_cycles(3);
    reset = 0;
    wait_cycles(3);
    sensor = 1;          // car arrives ...
    wait_cycles(3);
    sensor = 0;          // ... and turns right on red during the pause
    wait_cycles(2);
    sensor = 1;          // a car that waits
    wait_cycles(40);
    sensor = 0;          // second request, withdrawn during its pause
    wait_cycles(5);
    checks++;
    if (n_cancel != 2 || n_cycles_done != 1) begin
      failures++;
      $display("FAIL part 1: cancels=%0d full cycles=%0d", n_cancel, n_cycles_done);
    end
    // Part 2: random dials and sensor.
    for (int k = 0; k < 20; k++) begin
      @(negedge clk);
      if (m_state == THRU_G) begin
        d1 = 4'($urandom); d2 = 4'($urandom); d3 = 4'($urandom); d4 = 4'($urandom);
      end
      for (int n = 0; n < 60; n++) begin
        @(negedge clk);
        if ($urandom_range(0, 7) == 0) sensor = ~sensor;
      end
    end
    checks++;
    if (n_cancel < 2 || n_cycles_done < 3) begin
      failures++;
      $display("FAIL coverage: cancels=%0d full cycles=%0d", n_cancel, n_cycles_done);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
