// First-in first-out data queue.
//
// Q_SIZE words are held in a register array addressed by a read pointer and
// a write pointer, both wrapping modulo Q_SIZE, plus an occupancy count of
// log2(Q_SIZE)+1 bits. At each rising edge (reset synchronous, highest
// priority):
//   enq and deq together: if the queue is empty only the enqueue happens;
//     otherwise, full included, a word is written and the head is removed
//     in the same cycle and the count stays.
//   enq alone: written unless full (then ignored).
//   deq alone: head removed unless empty (then ignored).
// data_out is the word at the read pointer, read combinationally, so the
// head of the queue is always visible; it is meaningless while empty.
// Interface: clk, reset, enq, deq, data_in; data_out, empty, full.
// Queue depth 16 and the operation rules follow the notes; the word width
// of 8 bits is this design's choice.
module data_queue #(
  parameter int Q_SIZE    = 16,
  parameter int WORD_SIZE = 8
) (
  input  logic                 clk,
  input  logic                 reset,
  input  logic                 enq,
  input  logic                 deq,
  input  logic [WORD_SIZE-1:0] data_in,
  output logic [WORD_SIZE-1:0] data_out,
  output logic                 empty,
  output logic                 full
);
  localparam int PTR_W = $clog2(Q_SIZE);

  logic [WORD_SIZE-1:0] q_store [Q_SIZE];
  logic [PTR_W-1:0]     read_ptr, write_ptr;
  logic [PTR_W:0]       count;

  logic do_write, do_read;

  always_comb begin
    do_write = enq && (count < (PTR_W+1)'(Q_SIZE) || deq);
    do_read  = deq && count != '0;
  end

  always_ff @(posedge clk) begin
    if (do_write && !reset) q_store[write_ptr] <= data_in;
  end

  always_ff @(posedge clk) begin
    if (reset) begin
      read_ptr  <= '0;
      write_ptr <= '0;
      count     <= '0;
    end else begin
      if (do_write) write_ptr <= (write_ptr == PTR_W'(Q_SIZE-1)) ? '0 : write_ptr + 1'b1;
      if (do_read)  read_ptr  <= (read_ptr  == PTR_W'(Q_SIZE-1)) ? '0 : read_ptr  + 1'b1;
      if (do_write && !do_read)      count <= count + 1'b1;
      else if (do_read && !do_write) count <= count - 1'b1;
    end
  end

  assign data_out = q_store[read_ptr];
  assign empty    = (count == '0);
  assign full     = (count == (PTR_W+1)'(Q_SIZE));

  // A write never overruns and a read never underruns.
  property p_no_overflow;
    @(posedge clk) disable iff (reset) full && enq && !deq |=> full;
  endproperty
  assert property (p_no_overflow);
  assert property (@(posedge clk) disable iff (reset) count <= (PTR_W+1)'(Q_SIZE));
endmodule
