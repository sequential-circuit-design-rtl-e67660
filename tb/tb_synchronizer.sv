// Self-checking test of synchronizer: the output must equal the input as it
// was two rising edges earlier, for a random input stream.
module tb_synchronizer;
  logic clk = 1'b0;
  logic async_in, sync_out;
  logic [1:0] hist;
  int checks = 0, failures = 0;

  synchronizer dut (.clk, .async_in, .sync_out);

  always #5 clk = ~clk;

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    async_in = 0;
    for (int n = 0; n < 300; n++) begin
      // Change the input at an arbitrary point of the clock period.
      @(negedge clk);
      #($urandom_range(0, 4));
      async_in = logic'($urandom);
      @(posedge clk);
      hist = {hist[0], async_in};
      #1;
      // The value sampled at the previous edge is now at the output.
      if (n > 0) begin
        checks++;
        if (sync_out !== hist[1]) begin failures++; $display("FAIL at %0d", n); end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
