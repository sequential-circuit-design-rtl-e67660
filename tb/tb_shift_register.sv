// Self-checking test of shift_register: a random serial stream with random
// hold cycles (shift high); the parallel and serial outputs are compared
// with a reference shift register after every edge, and a single marked
// bit is timed from input to serial output.
module tb_shift_register;
  logic clk = 1'b0;
  logic shift, d, q;
  logic [3:0] par_q, ref_r;
  int checks = 0, failures = 0;

  shift_register dut (.clk, .shift, .d, .q, .par_q);

  always #5 clk = ~clk;

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic step(input logic sh, input logic din);
    @(negedge clk);
    shift = sh; d = din;
    @(posedge clk);
    #1;
    if (!sh) ref_r = {ref_r[2:0], din};
  endtask

  initial begin
    // Flush four zeros in so the contents are known.
    for (int i = 0; i < 4; i++) step(1'b0, 1'b0);
    ref_r = 4'h0;
    checks++;
    if (par_q !== 4'h0) failures++;
    // Latency: a single 1 reaches q after exactly four shifts.
    step(1'b0, 1'b1);
    for (int i = 1; i <= 4; i++) begin
      checks++;
      if (q !== (i == 4)) begin failures++; $display("FAIL latency at shift %0d", i); end
      if (i < 4) step(1'b0, 1'b0);
    end
    for (int n = 0; n < 300; n++) begin
      step(logic'($urandom_range(0, 3) == 0), logic'($urandom));
      checks++;
      if (par_q !== ref_r || q !== ref_r[3]) begin
        failures++;
        $display("FAIL par_q=%b q=%b expected %b", par_q, q, ref_r);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
