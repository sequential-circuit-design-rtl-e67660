// Exhaustive test of tl_comparator over all pairs of 4-bit values.
module tb_tl_comparator;
  logic [3:0] a, b;
  logic eq;
  int checks = 0, failures = 0;

  tl_comparator dut (.a, .b, .eq);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 16; i++)
      for (int j = 0; j < 16; j++) begin
        a = 4'(i); b = 4'(j);
        #1;
        checks++;
        if (eq !== (i == j)) begin failures++; $display("FAIL a=%0d b=%0d eq=%b", i, j, eq); end
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
