// Shared constants and types for the sequential-circuit collection.
//
// WORD_SIZE is the common key/value/delay width (4 bits) used by the
// priority queue and the traffic-light controller. pq_elem_t is one cell of
// the priority queue: a data-present bit plus a key and a value. tl_state_t
// is the traffic-light controller's state assignment (000 thruG, 001 pause,
// 010 thruY, 011 thruR, 100 crossY), as given with the controller's block
// diagram.
package seq_pkg;
  localparam int WORD_SIZE = 4;

  typedef struct packed {
    logic                 dp;
    logic [WORD_SIZE-1:0] key;
    logic [WORD_SIZE-1:0] value;
  } pq_elem_t;

  typedef enum logic [2:0] {
    THRU_G  = 3'b000,
    PAUSE   = 3'b001,
    THRU_Y  = 3'b010,
    THRU_R  = 3'b011,
    CROSS_Y = 3'b100
  } tl_state_t;
endpackage
