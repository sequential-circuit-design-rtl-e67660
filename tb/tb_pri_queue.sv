// Self-checking test of pri_queue against a list model. Keys held in the
// queue at one time are kept distinct so the smallest one is unambiguous.
// Checks: small_value, empty and full every idle cycle; busy exactly one
// cycle after every accepted insert or delete (two cycles per operation);
// refused inserts when full and refused deletes when empty leave the queue
// unchanged and do not raise busy.
module tb_pri_queue;
  import seq_pkg::*;
  localparam int CAP = 8;
  logic clk = 1'b0;
  logic reset, insert, delete_min, busy, empty, full;
  logic [3:0] key, value, small_value;
  logic [3:0] mkey [$], mval [$];
  int checks = 0, failures = 0, n_ins = 0, n_del = 0, n_full_rej = 0, n_empty_rej = 0;

  pri_queue dut (.clk, .reset, .insert, .delete_min, .key, .value, .small_value, .busy, .empty,
                 .full);

  always #5 clk = ~clk;

  initial begin
    #200000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic bit key_used(input logic [3:0] k);
    foreach (mkey[i]) if (mkey[i] == k) return 1;
    return 0;
  endfunction

  function automatic int min_index();
    int m = 0;
    foreach (mkey[i]) if (mkey[i] < mkey[m]) m = i;
    return m;
  endfunction

  task automatic check_idle();
    checks++;
    if (busy || empty !== (mkey.size() == 0) || full !== (mkey.size() == CAP)) begin
      failures++;
      $display("FAIL flags busy=%b empty=%b full=%b size=%0d", busy, empty, full, mkey.size());
    end
    checks++;
    if (small_value !== (mkey.size() ? mval[min_index()] : 4'h0)) begin
      failures++;
      $display("FAIL small_value=%h", small_value);
    end
  endtask

  // One request; the operation finishes when busy drops again.
  task automatic op(input bit ins, input logic [3:0] k, input logic [3:0] v);
    bit accept;
    @(negedge clk);
    insert = ins; delete_min = !ins; key = k; value = v;
    accept = ins ? (mkey.size() < CAP) : (mkey.size() > 0);
    @(posedge clk); #1;
    @(negedge clk);
    insert = 0; delete_min = 0;
    checks++;
    if (busy !== accept) begin failures++; $display("FAIL busy=%b accept=%b", busy, accept); end
    if (accept) begin
      if (ins) begin mkey.push_back(k); mval.push_back(v); n_ins++; end
      else begin
        int m = min_index();
        mkey.delete(m); mval.delete(m); n_del++;
      end
      @(posedge clk); #1;
    end else if (ins) n_full_rej++;
    else n_empty_rej++;
    check_idle();
  endtask

  initial begin
    logic [3:0] k;
    @(negedge clk); reset = 1; insert = 0; delete_min = 0; key = 0; value = 0;
    @(posedge clk); #1;
    @(negedge clk); reset = 0;
    check_idle();
    op(0, 0, 0);                                   // delete while empty
    for (int i = 0; i < CAP; i++) op(1, 4'(7 * i + 3), 4'(i));  // fill
    op(1, 4'h0, 4'hF);                             // insert while full
    for (int i = 0; i < CAP + 1; i++) op(0, 0, 0); // drain, one extra
    for (int n = 0; n < 400; n++) begin
      bit ins = ($urandom_range(0, 9) < ((n / 50) % 2 ? 3 : 7));
      if (ins && mkey.size() < 16) begin
        do k = 4'($urandom); while (key_used(k) && mkey.size() < CAP);
        if (key_used(k)) k = 4'h0;  // queue full: the request is refused anyway
      end
      op(ins, k, 4'($urandom));
    end
    checks++;
    if (n_ins == 0 || n_del == 0 || n_full_rej == 0 || n_empty_rej == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
