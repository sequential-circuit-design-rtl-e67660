// Self-checking test of bidir_shift_register: random combinations of ld,
// sl, sr and d, checked against a reference model after every edge, plus
// counts that every operation (hold, load, left, right) occurred.
module tb_bidir_shift_register;
  logic clk = 1'b0;
  logic ld, sl, sr;
  logic [3:0] d, q, ref_q;
  int checks = 0, failures = 0;
  int n_hold = 0, n_load = 0, n_left = 0, n_right = 0;

  bidir_shift_register dut (.clk, .ld, .sl, .sr, .d, .q);

  always #5 clk = ~clk;

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    @(negedge clk); ld = 1; sl = 0; sr = 0; d = 4'h5;
    @(posedge clk); #1 ref_q = 4'h5;
    for (int n = 0; n < 400; n++) begin
      @(negedge clk);
      {ld, sl, sr} = 3'($urandom);
      d = 4'($urandom);
      @(posedge clk);
      #1;
      if (!ld) n_hold++;
      else if (sl) begin ref_q = {ref_q[2], ref_q[1], ref_q[0], d[0]}; n_left++; end
      else if (sr) begin ref_q = {d[3], ref_q[3], ref_q[2], ref_q[1]}; n_right++; end
      else begin ref_q = d; n_load++; end
      checks++;
      if (q !== ref_q) begin
        failures++;
        $display("FAIL ld=%b sl=%b sr=%b d=%b q=%b expected %b", ld, sl, sr, d, q, ref_q);
      end
    end
    checks++;
    if (n_hold == 0 || n_load == 0 || n_left == 0 || n_right == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
