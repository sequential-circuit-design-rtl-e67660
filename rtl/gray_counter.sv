// Three-bit Gray-code counter.
//
// Counts through 000, 001, 011, 010, 110, 111, 101, 100 and back to 000,
// so exactly one bit changes per step. The next value is selected by the
// current value (a multiplexer, i.e. a case statement); changing the table
// gives any other counting order. clr (synchronous) forces 000 and has
// priority over cnt; with both low the value holds.
// Interface: clk, clr, cnt; q[2:0], updated one edge after a step. The
// sequence and the control follow the notes.
module gray_counter (
  input  logic       clk,
  input  logic       clr,
  input  logic       cnt,
  output logic [2:0] q
);
  logic [2:0] q_next;

  always_comb begin
    unique case (q)
      3'b000: q_next = 3'b001;
      3'b001: q_next = 3'b011;
      3'b011: q_next = 3'b010;
      3'b010: q_next = 3'b110;
      3'b110: q_next = 3'b111;
      3'b111: q_next = 3'b101;
      3'b101: q_next = 3'b100;
      3'b100: q_next = 3'b000;
    endcase
  end

  always_ff @(posedge clk) begin
    if (clr)      q <= 3'b000;
    else if (cnt) q <= q_next;
  end
endmodule
