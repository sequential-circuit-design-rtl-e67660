// Self-checking test of tl_timer: random enable runs; the count must be the
// number of consecutive enabled edges since the last disabled one, modulo
// 16, with at least one wrap.
module tb_tl_timer;
  logic clk = 1'b0;
  logic en;
  logic [3:0] count;
  int run = 0, checks = 0, failures = 0, wraps = 0;

  tl_timer dut (.clk, .en, .count);

  always #5 clk = ~clk;

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    @(negedge clk); en = 0;
    @(posedge clk); #1;
    for (int n = 0; n < 400; n++) begin
      @(negedge clk);
      en = (n < 20) ? 1'b1 : logic'($urandom_range(0, 7) != 0);
      @(posedge clk); #1;
      if (en) run++; else run = 0;
      if (en && run % 16 == 0) wraps++;
      checks++;
      if (count !== 4'(run)) begin failures++; $display("FAIL count=%0d expected %0d", count, run % 16); end
    end
    checks++;
    if (wraps == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
