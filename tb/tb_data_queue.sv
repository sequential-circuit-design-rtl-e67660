// Self-checking test of data_queue against a SystemVerilog queue model.
// Phases: fill to full (and try one more enqueue), drain to empty (and try
// one more dequeue), simultaneous enqueue and dequeue when empty, in the
// middle and when full, then random traffic. data_out, empty and full are
// compared every cycle; each special case is counted and must occur.
module tb_data_queue;
  localparam int QS = 16;
  logic clk = 1'b0;
  logic reset, enq, deq, empty, full;
  logic [7:0] data_in, data_out;
  logic [7:0] model [$];
  int checks = 0, failures = 0;
  int n_full_rej = 0, n_empty_rej = 0, n_both_empty = 0, n_both_full = 0, n_both_mid = 0;

  data_queue dut (.clk, .reset, .enq, .deq, .data_in, .data_out, .empty, .full);

  always #5 clk = ~clk;

  initial begin
    #200000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic cycle(input logic e, input logic dq, input logic [7:0] din);
    int n;
    @(negedge clk);
    enq = e; deq = dq; data_in = din;
    n = model.size();
    @(posedge clk);
    #1;
    if (e && dq) begin
      if (n == 0) begin model.push_back(din); n_both_empty++; end
      else begin
        void'(model.pop_front()); model.push_back(din);
        if (n == QS) n_both_full++; else n_both_mid++;
      end
    end else if (e) begin
      if (n < QS) model.push_back(din); else n_full_rej++;
    end else if (dq) begin
      if (n > 0) void'(model.pop_front()); else n_empty_rej++;
    end
    checks++;
    if (empty !== (model.size() == 0) || full !== (model.size() == QS)) begin
      failures++;
      $display("FAIL flags empty=%b full=%b size=%0d", empty, full, model.size());
    end
    if (model.size() > 0) begin
      checks++;
      if (data_out !== model[0]) begin
        failures++;
        $display("FAIL data_out=%0d expected %0d", data_out, model[0]);
      end
    end
  endtask

  initial begin
    @(negedge clk); reset = 1; enq = 0; deq = 0; data_in = 0;
    @(posedge clk); #1;
    @(negedge clk); reset = 0;
    checks++;
    if (!empty || full) failures++;
    for (int i = 0; i < QS + 1; i++) cycle(1, 0, 8'(i + 1));
    cycle(1, 1, 8'd100);
    for (int i = 0; i < QS + 1; i++) cycle(0, 1, 8'd0);
    cycle(1, 1, 8'd101);
    for (int i = 0; i < 5; i++) cycle(1, 1, 8'(110 + i));
    for (int n = 0; n < 600; n++)
      cycle(logic'($urandom_range(0, 9) < ((n / 100) % 2 ? 3 : 7)), logic'($urandom_range(0, 1)),
            8'($urandom));
    checks++;
    if (n_full_rej == 0 || n_empty_rej == 0 || n_both_empty == 0 || n_both_full == 0 ||
        n_both_mid == 0) begin
      failures++;
      $display("FAIL coverage %0d %0d %0d %0d %0d", n_full_rej, n_empty_rej, n_both_empty,
               n_both_full, n_both_mid);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
