// oabc_pkg: types and constants shared by the opposition-based artificial
// bee colony (OABC) optimizer and the adaptive noise filter.
//
// The optimizer is sequenced by a finite state machine whose states follow
// the phases of the algorithm: random initialisation, employed bees, global
// detection of the best and worst fitness, probability computation, onlooker
// bees, opposition (scout) step and a final global detection. The state
// encoding is this design's own choice.
package oabc_pkg;

  typedef enum logic [3:0] {
    ST_IDLE   = 4'd0,  // waiting for start
    ST_INIT   = 4'd1,  // random positions loaded into the register bank
    ST_EMPLOY = 4'd2,  // every bee tries one neighbour-based move
    ST_GLOBAL = 4'd3,  // sequential scan for f_min / f_max
    ST_PROB   = 4'd4,  // p(i) = f_i / f_max, onlooker selection
    ST_ONLOOK = 4'd5,  // selected bees try one more move
    ST_SCOUT  = 4'd6,  // opposition step for exhausted bees
    ST_FINAL  = 4'd7,  // last global scan before done
    ST_DONE   = 4'd8   // result valid
  } oabc_state_t;

  // Width of the fitness-unit operands (x1[15..0] .. x4[15..0]) and of
  // their result (f1[31..0], f2[31..0]).
  localparam int unsigned FIT_XW = 16;
  localparam int unsigned FIT_FW = 32;

  // Fitness function selection for the bee lanes.
  localparam int unsigned FIT_SPHERE     = 1;  // f1: sum of squares
  localparam int unsigned FIT_SQUARE_SUM = 2;  // f2: square of the sum

endpackage
