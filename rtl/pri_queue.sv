// Two-row systolic priority queue.
//
// Stores up to 2*ROW_SIZE (key, value) pairs and always shows the value of
// the pair with the smallest key. The cells form two rows of ROW_SIZE
// columns; each cell holds a data-present bit, a key and a value. The rows
// keep three rules: occupied cells are packed to the left, an occupied top
// cell always has an occupied cell below it, and in every column the bottom
// key is not larger than the top key; the bottom row is then sorted and its
// left cell holds the minimum.
//
// Each operation takes two clock cycles. In the first, an insert shifts the
// top row one place right and puts the new pair in the left top cell
// (refused while the right top cell is occupied, i.e. full), and a delete
// shifts the bottom row one place left, emptying the right bottom cell
// (refused while empty). In the second cycle (busy high) every column
// compares its two cells and swaps them if the top one is occupied and has
// a smaller key or the bottom one is empty. insert has priority over delete_min;
// requests are ignored while busy or when refused.
//
// Interface: clk, reset (synchronous; empties every cell), insert, delete_min,
// key, value; small_value (0 when empty), busy, empty, full, all taken from
// registers. Cell organisation, the two-cycle operation, the 4x2 cells and
// the 4-bit words follow the notes. Keys that tie are not swapped, so among
// equal keys the one already in the bottom row comes out first.
module pri_queue
  import seq_pkg::*;
#(
  parameter int ROW_SIZE = 4
) (
  input  logic                 clk,
  input  logic                 reset,
  input  logic                 insert,
  input  logic                 delete_min,
  input  logic [WORD_SIZE-1:0] key,
  input  logic [WORD_SIZE-1:0] value,
  output logic [WORD_SIZE-1:0] small_value,
  output logic                 busy,
  output logic                 empty,
  output logic                 full
);
  typedef enum logic [1:0] {READY, INSERTING, DELETING} pq_state_t;

  pq_elem_t  top [ROW_SIZE];
  pq_elem_t  bot [ROW_SIZE];
  pq_state_t state;

  always_ff @(posedge clk) begin
    if (reset) begin
      for (int i = 0; i < ROW_SIZE; i++) begin
        top[i] <= '0;
        bot[i] <= '0;
      end
      state <= READY;
    end else if (state == READY && insert) begin
      if (!top[ROW_SIZE-1].dp) begin
        // Shift the top row right and enter the new pair at the left.
        for (int i = 1; i < ROW_SIZE; i++) top[i] <= top[i-1];
        top[0] <= '{dp: 1'b1, key: key, value: value};
        state  <= INSERTING;
      end
    end else if (state == READY && delete_min) begin
      if (bot[0].dp) begin
        // Shift the bottom row left, dropping the minimum.
        for (int i = 0; i < ROW_SIZE-1; i++) bot[i] <= bot[i+1];
        bot[ROW_SIZE-1].dp <= 1'b0;
        state <= DELETING;
      end
    end else if (state != READY) begin
      // Compare and swap within every column.
      for (int i = 0; i < ROW_SIZE; i++) begin
        if (top[i].dp && (top[i].key < bot[i].key || !bot[i].dp)) begin
          bot[i] <= top[i];
          top[i] <= bot[i];
        end
      end
      state <= READY;
    end
  end

  assign small_value = bot[0].dp ? bot[0].value : '0;
  assign empty       = !bot[0].dp;
  assign full        = top[ROW_SIZE-1].dp;
  assign busy        = (state != READY);

  // Structural rules of the two rows, checked whenever the queue is idle.
  always_ff @(posedge clk) begin
    if (!reset && state == READY) begin
      for (int i = 0; i < ROW_SIZE; i++) begin
        assert (!top[i].dp || bot[i].dp);
        assert (!(top[i].dp && bot[i].dp) || bot[i].key <= top[i].key);
      end
    end
  end
endmodule
