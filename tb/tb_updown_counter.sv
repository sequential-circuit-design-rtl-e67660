// Self-checking test of updown_counter: a load, then random mixes of load,
// count up, count down and hold, checked against modulo-16 arithmetic
// after every edge; wraps in both directions must occur.
module tb_updown_counter;
  logic clk = 1'b0;
  logic ld, cnt, up;
  logic [3:0] d, q, ref_q;
  int checks = 0, failures = 0, wrap_up = 0, wrap_down = 0;

  updown_counter dut (.clk, .ld, .cnt, .up, .d, .q);

  always #5 clk = ~clk;

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    @(negedge clk); ld = 1; cnt = 0; up = 0; d = 4'h9;
    @(posedge clk); #1 ref_q = 4'h9;
    checks++;
    if (q !== 4'h9) failures++;
    // Directed sequence: loads of 1, A, 2, one idle cycle, ten steps down
    // through zero, then two steps up; expected 1 A 2 2 1 0 F E D C B A 9 8 9 A.
    begin
      static logic [3:0] exp_q [16] = '{4'h1, 4'hA, 4'h2, 4'h2, 4'h1, 4'h0, 4'hF, 4'hE, 4'hD,
                                        4'hC, 4'hB, 4'hA, 4'h9, 4'h8, 4'h9, 4'hA};
      static logic [3:0] loads [3] = '{4'h1, 4'hA, 4'h2};
      for (int i = 0; i < 16; i++) begin
        @(negedge clk);
        ld  = (i < 3);
        d   = (i < 3) ? loads[i] : 4'h5;
        cnt = (i > 3);
        up  = (i > 13);
        @(posedge clk);
        #1;
        checks++;
        if (q !== exp_q[i]) begin failures++; $display("FAIL step %0d q=%h expected %h", i, q, exp_q[i]); end
      end
      ref_q = 4'hA;
    end
    for (int n = 0; n < 500; n++) begin
      @(negedge clk);
      ld  = ($urandom_range(0, 9) == 0);
      cnt = ($urandom_range(0, 4) != 0);
      up  = (n / 40) % 2 == 0;
      d   = 4'($urandom);
      @(posedge clk);
      #1;
      if (ld) ref_q = d;
      else if (cnt) begin
        if (up) begin
          if (ref_q == 15) begin ref_q = 0; wrap_up++; end else ref_q = ref_q + 1;
        end else begin
          if (ref_q == 0) begin ref_q = 15; wrap_down++; end else ref_q = ref_q - 1;
        end
      end
      checks++;
      if (q !== ref_q) begin failures++; $display("FAIL q=%h expected %h", q, ref_q); end
    end
    checks++;
    if (wrap_up == 0 || wrap_down == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
