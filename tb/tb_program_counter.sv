// Self-checking test of program_counter: random reset, load, increment and
// bus-enable patterns checked against a reference model with the priority
// reset > load > increment > hold; increment wraps from 15 to 0.
module tb_program_counter;
  logic clk = 1'b0;
  logic reset, ld, inc, en_a, q_oe;
  logic [3:0] d, q, ref_q;
  int checks = 0, failures = 0, n_reset = 0, n_load = 0, n_inc = 0, n_wrap = 0;

  program_counter dut (.clk, .reset, .ld, .inc, .en_a, .d, .q, .q_oe);

  always #5 clk = ~clk;

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    @(negedge clk); reset = 1; ld = 0; inc = 0; en_a = 0; d = 0;
    @(posedge clk); #1 ref_q = 0;
    for (int n = 0; n < 500; n++) begin
      @(negedge clk);
      reset = ($urandom_range(0, 40) == 0);
      ld    = ($urandom_range(0, 7) == 0);
      inc   = ($urandom_range(0, 4) != 0);
      en_a  = logic'($urandom);
      d     = 4'($urandom);
      #1;
      checks++;
      if (q_oe !== en_a) failures++;
      @(posedge clk);
      #1;
      if (reset) begin ref_q = 0; n_reset++; end
      else if (ld) begin ref_q = d; n_load++; end
      else if (inc) begin
        n_inc++;
        if (ref_q == 4'hF) n_wrap++;
        ref_q = ref_q + 4'd1;
      end
      checks++;
      if (q !== ref_q) begin failures++; $display("FAIL q=%h expected %h", q, ref_q); end
    end
    checks++;
    if (n_reset == 0 || n_load == 0 || n_inc == 0 || n_wrap == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
