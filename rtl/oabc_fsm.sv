// oabc_fsm: finite state machine that sequences the OABC optimizer.
//
// One optimisation run, started by a `start` pulse in ST_IDLE or ST_DONE:
//   ST_INIT   (1 cycle)  random positions written into the register bank
//   then MAX_ITER times:
//     ST_EMPLOY (1 cycle)  all S bees try a neighbour move in parallel
//     ST_GLOBAL (until glob_done)  sequential f_min / f_max scan
//     ST_PROB   (until prob_done)  probabilities and onlooker selection
//     ST_ONLOOK (1 cycle)  the selected bees try one more move
//     ST_SCOUT  (1 cycle)  opposition step for bees whose trial counter
//                          reached its limit
//   ST_FINAL  (until glob_done)  global scan of the final colony
//   ST_DONE   result valid, `done` high, until the next start.
// glob_start / prob_start are one-cycle pulses issued in the cycle in which
// the machine enters ST_GLOBAL/ST_FINAL and ST_PROB. `iter` counts the
// completed iterations of the current run.
//
// The FSM with clk, reset and start inputs and a state output, and the order
// employed -> fitness -> individual -> global detection -> probability ->
// onlooker -> opposition, follow the parallel architecture; the number of
// cycles per phase and the iteration count are design choices.
module oabc_fsm
  import oabc_pkg::*;
#(
  parameter int unsigned MAX_ITER = 32,   // iterations per run
  parameter int unsigned ITW      = 16    // iteration counter width
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             start,
  input  logic             glob_done,
  input  logic             prob_done,
  output oabc_state_t      state,
  output logic             glob_start,
  output logic             prob_start,
  output logic             done,
  output logic [ITW-1:0]   iter
);

  oabc_state_t next;
  logic        last_iter;

  assign last_iter = (iter == ITW'(MAX_ITER - 1));

  always_comb begin
    next = state;
    unique case (state)
      ST_IDLE, ST_DONE: if (start) next = ST_INIT;
      ST_INIT:   next = ST_EMPLOY;
      ST_EMPLOY: next = ST_GLOBAL;
      ST_GLOBAL: if (glob_done) next = ST_PROB;
      ST_PROB:   if (prob_done) next = ST_ONLOOK;
      ST_ONLOOK: next = ST_SCOUT;
      ST_SCOUT:  next = last_iter ? ST_FINAL : ST_EMPLOY;
      ST_FINAL:  if (glob_done) next = ST_DONE;
      default:   next = ST_IDLE;
    endcase
  end

  always_comb begin
    glob_start = (next == ST_GLOBAL && state != ST_GLOBAL) ||
                 (next == ST_FINAL  && state != ST_FINAL);
    prob_start = (next == ST_PROB && state != ST_PROB);
    done       = (state == ST_DONE);
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      state <= ST_IDLE;
      iter  <= '0;
    end else begin
      state <= next;
      if (state == ST_INIT)
        iter <= '0;
      else if (state == ST_SCOUT && !last_iter)
        iter <= iter + 1'b1;
    end
  end

  // A run must contain at least one iteration.
  initial assert (MAX_ITER >= 1) else $error("MAX_ITER must be at least 1");

endmodule
