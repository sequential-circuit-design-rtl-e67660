// Self-checking test of load_register: random load enables and data; a
// reference value is updated only on loads and compared after every edge.
module tb_load_register;
  logic clk = 1'b0;
  logic ld;
  logic [3:0] d, q, ref_q;
  int checks = 0, failures = 0, loads = 0, holds = 0;

  load_register dut (.clk, .ld, .d, .q);

  always #5 clk = ~clk;

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    ld = 1'b1; d = 4'h0;
    @(posedge clk); #1 ref_q = 4'h0;
    for (int n = 0; n < 300; n++) begin
      @(negedge clk);
      ld = ($urandom_range(0, 2) == 0);
      d  = 4'($urandom);
      @(posedge clk);
      #1;
      if (ld) begin ref_q = d; loads++; end else holds++;
      checks++;
      if (q !== ref_q) begin
        failures++;
        $display("FAIL ld=%b d=%h q=%h expected %h", ld, d, q, ref_q);
      end
    end
    checks++;
    if (loads == 0 || holds == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
