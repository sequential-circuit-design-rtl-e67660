// Self-checking test of tl_controller against the controller's state table
// (current state, sensor and d1..d4 give ten, the six lights and the next
// state). Every used state is driven with random inputs many times; every
// table row must be exercised. Reset must return the machine to thruG.
module tb_tl_controller;
  import seq_pkg::*;
  logic clk = 1'b0;
  logic reset, s, ten, t_g, t_y, t_r, x_g, x_y, x_r;
  logic [3:0] d;
  tl_state_t state;
  int checks = 0, failures = 0;
  int row_hits [11];

  tl_controller dut (.clk, .reset, .s, .d, .ten, .t_g, .t_y, .t_r, .x_g, .x_y, .x_r, .state);

  always #5 clk = ~clk;

  initial begin
    #200000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // The table: returns {row, ten, tG tY tR, xG xY xR, next state}.
  task automatic table_row(input logic [2:0] cs, input logic sen, input logic [3:0] dd,
                           output int row, output logic [6:0] outs, output logic [2:0] ns);
    logic d1 = dd[0], d2 = dd[1], d3 = dd[2], d4 = dd[3];
    case (cs)
      3'b000: if (!sen) begin row = 0; outs = 7'b0_100_001; ns = 3'b000; end
              else      begin row = 1; outs = 7'b0_100_001; ns = 3'b001; end
      3'b001: if (!sen)     begin row = 2; outs = 7'b0_100_001; ns = 3'b000; end
              else if (!d1) begin row = 3; outs = 7'b1_100_001; ns = 3'b001; end
              else          begin row = 4; outs = 7'b0_100_001; ns = 3'b010; end
      3'b010: if (!d2) begin row = 5; outs = 7'b1_010_001; ns = 3'b010; end
              else     begin row = 6; outs = 7'b0_010_001; ns = 3'b011; end
      3'b011: if (!d3) begin row = 7; outs = 7'b1_001_100; ns = 3'b011; end
              else     begin row = 8; outs = 7'b0_001_100; ns = 3'b100; end
      default: if (!d4) begin row = 9;  outs = 7'b1_001_010; ns = 3'b100; end
               else     begin row = 10; outs = 7'b0_001_010; ns = 3'b000; end
    endcase
  endtask

  initial begin
    int row;
    logic [6:0] outs;
    logic [2:0] ns, cs;
    @(negedge clk); reset = 1; s = 0; d = 0;
    @(posedge clk); #1;
    checks++;
    if (state !== THRU_G) failures++;
    @(negedge clk); reset = 0;
    for (int n = 0; n < 3000; n++) begin
      @(negedge clk);
      s = ($urandom_range(0, 3) != 0);
      d = 4'($urandom) & 4'($urandom);  // comparator hits are sparse
      if (n % 500 == 499) reset = 1;
      #1;
      cs = state;
      table_row(cs, s, d, row, outs, ns);
      if (reset) ns = 3'b000;
      else row_hits[row]++;
      checks++;
      if ({ten, t_g, t_y, t_r, x_g, x_y, x_r} !== outs) begin
        failures++;
        $display("FAIL state=%b s=%b d=%b outs=%b expected %b", cs, s, d,
                 {ten, t_g, t_y, t_r, x_g, x_y, x_r}, outs);
      end
      @(posedge clk); #1;
      reset = 0;
      checks++;
      if (state !== ns) begin failures++; $display("FAIL next state=%b expected %b", state, ns); end
    end
    foreach (row_hits[i]) begin
      checks++;
      if (row_hits[i] == 0) begin failures++; $display("FAIL table row %0d never used", i); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
