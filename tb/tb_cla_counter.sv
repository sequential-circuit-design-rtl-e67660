// Self-checking test of cla_counter. The counter has no reset, so the
// test reads its starting value and then predicts every later value from
// the enable sequence; the carry outputs are checked against the AND of
// the enable and all lower bits. A run of 16 enabled edges must return the
// counter to its start value (one full wrap).
module tb_cla_counter;
  logic clk = 1'b0;
  logic en;
  logic [3:0] q, c, ref_q, ref_c;
  int checks = 0, failures = 0, wraps = 0;

  cla_counter dut (.clk, .en, .q, .c);

  always #5 clk = ~clk;

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [3:0] carries(input logic e, input logic [3:0] v);
    logic run = e;
    for (int i = 0; i < 4; i++) begin
      run = run & v[i];
      carries[i] = run;
    end
  endfunction

  initial begin
    @(negedge clk); en = 1'b0;
    ref_q = q;
    for (int n = 0; n < 300; n++) begin
      @(negedge clk);
      en = (n < 16) ? 1'b1 : logic'($urandom_range(0, 3) != 0);
      #1;
      ref_c = carries(en, ref_q);
      checks++;
      if (c !== ref_c) begin failures++; $display("FAIL c=%b expected %b", c, ref_c); end
      if (en && ref_q == 4'hF) wraps++;
      @(posedge clk);
      #1;
      if (en) ref_q = ref_q + 4'd1;
      checks++;
      if (q !== ref_q) begin failures++; $display("FAIL q=%h expected %h", q, ref_q); end
    end
    checks++;
    if (wraps == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
