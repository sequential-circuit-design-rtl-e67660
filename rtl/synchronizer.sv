// Two-flip-flop synchronizer for an asynchronous input.
//
// The first flip-flop samples the asynchronous input and may go metastable;
// the second samples it one clock period later, by when it has very
// probably settled. The mean time between failures grows roughly as
// exp(T/tau) with the clock period T, so the output is "probably safe"
// rather than guaranteed. Interface: clk, async_in; sync_out follows
// async_in two rising edges later. The two-stage structure follows the
// notes; there is no reset, as in the notes.
module synchronizer (
  input  logic clk,
  input  logic async_in,
  output logic sync_out
);
  logic meta;

  always_ff @(posedge clk) begin
    meta     <= async_in;
    sync_out <= meta;
  end
endmodule
