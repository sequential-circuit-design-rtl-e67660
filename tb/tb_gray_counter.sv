// Self-checking test of gray_counter: after a clear, every enabled step must
// give the reflected binary Gray code of a binary step count, b ^ (b >> 1),
// and change exactly one bit; hold and clear are checked as well.
module tb_gray_counter;
  logic clk = 1'b0;
  logic clr, cnt;
  logic [2:0] q, prev;
  logic [2:0] bin;
  int checks = 0, failures = 0;

  gray_counter dut (.clk, .clr, .cnt, .q);

  always #5 clk = ~clk;

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    @(negedge clk); clr = 1; cnt = 1;
    @(posedge clk); #1;
    bin = 3'd0;
    checks++;
    if (q !== 3'b000) failures++;
    for (int n = 0; n < 200; n++) begin
      @(negedge clk);
      clr = (n % 37 == 36);
      cnt = ($urandom_range(0, 3) != 0);
      prev = q;
      @(posedge clk);
      #1;
      if (clr) bin = 3'd0;
      else if (cnt) bin = bin + 3'd1;
      checks++;
      if (q !== (bin ^ (bin >> 1))) begin
        failures++;
        $display("FAIL q=%b expected %b", q, bin ^ (bin >> 1));
      end
      if (!clr && cnt) begin
        checks++;
        if ($countones(q ^ prev) != 1) failures++;
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
