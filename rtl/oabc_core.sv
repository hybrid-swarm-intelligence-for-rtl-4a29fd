// oabc_core: parallel opposition-based artificial bee colony optimizer.
//
// S bee lanes work in parallel on a colony of S food sources, each a point
// of D = 4 unsigned XW-bit coordinates in [0, l_max]. The fitness (cost) of a
// point is minimised. Per lane:
//   - two 16-bit LFSRs (rnd_a, rnd_b) seeded from `seed`;
//   - neighbour/parameter selection from rnd_a: phi = rnd_a[XW-1:0],
//     j = rnd_a[XW +: log2 D], k = rnd_a[XW+log2 D +: log2 S] (k = i + 1 if
//     it equals the lane's own index);
//   - a bee_update unit (distance, mutate, add, l_max comparator) that
//     forms the candidate coordinate in XW.XW fixed point against the limit
//     {l_max, all ones}; its integer part replaces coordinate j, all other
//     coordinates unchanged;
//   - a fitness unit (f1 or f2, chosen by FIT_FUNC) on the candidate;
//   - a bee_individual register-bank entry doing the greedy <= selection
//     and the trial counter.
// Shared by all lanes: a global_detect scan (f_min, f_max, best index), a
// probability_unit (p(i) = f_i / f_max, onlooker(i) = p(i) <= rnd_b) and the
// oabc_fsm sequencer. The same bee_update and fitness hardware serves the
// employed phase, the onlooker phase (only lanes with onlooker(i) set), the
// random initialisation (coordinates from {rnd_a, rnd_b} limited to l_max)
// and the opposition step, which, for every bee whose trial counter reached
// MAX_TR, inverts the most significant bit of each coordinate (limited to
// l_max) and loads the result unconditionally.
// After every global scan the best point seen in the run is kept in
// best_x / best_f. `done` is high once the run of MAX_ITER iterations ends.
//
// Timing per iteration: 1 (employed) + (S + 1) (global scan) +
// (2 + NR_ITERS + S) (probabilities) + 1 (onlooker) + 1 (opposition) cycles;
// a run adds 2 cycles for start and initialisation and S + 1 for the final
// scan. ev_* outputs pulse for one cycle per lane event.
//
// The lane structure, the parallel bees, the l_max comparator, the <=
// selection with trial counters, the sequential global scan, the division
// by f_max, the comparison with per-bee random numbers and the sign-bit
// inversion as opposition step follow the published architecture. The
// colony size, iteration count, trial limit, coordinate width and the
// random-bit assignment are design choices.
module oabc_core
  import oabc_pkg::*;
#(
  parameter int unsigned S        = 4,           // parallel bees
  parameter int unsigned XW       = 8,           // coordinate width
  parameter int unsigned MAX_ITER = 32,          // iterations per run
  parameter int unsigned MAX_TR   = 8,           // trial limit (opposition)
  parameter int unsigned FIT_FUNC = FIT_SPHERE,  // 1: f1, 2: f2
  parameter int unsigned TRW      = 8,           // trial counter width
  parameter int unsigned ITW      = 16           // iteration counter width
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 start,
  input  logic [15:0]          seed,
  input  logic [XW-1:0]        l_max,
  output oabc_state_t          state,
  output logic [ITW-1:0]       iter,
  output logic                 done,
  output logic                 best_valid,
  output logic [FIT_FW-1:0]    best_f,
  output logic [3:0][XW-1:0]   best_x,
  output logic [S-1:0]         ev_accept,   // greedy selection took candidate
  output logic [S-1:0]         ev_reject,   // candidate worse, tr = tr + 1
  output logic [S-1:0]         ev_clamp,    // bee_update limited to l_max
  output logic [S-1:0]         ev_opposite, // opposition step applied
  output logic [S-1:0]         onlooker     // onlooker selection of last scan
);

  localparam int unsigned D  = 4;
  localparam int unsigned FW = FIT_FW;
  localparam int unsigned JB = $clog2(D);
  localparam int unsigned KB = (S > 1) ? $clog2(S) : 1;

  typedef logic [D-1:0][XW-1:0] point_t;

  logic [S-1:0][15:0]   rnd_a, rnd_b;
  point_t [S-1:0]       pos;
  logic [S-1:0][FW-1:0] fit;
  logic [S-1:0][TRW-1:0] tr;

  logic                 glob_start, glob_done, glob_busy;
  logic                 prob_start, prob_done, prob_busy;
  logic [FW-1:0]        g_fmin, g_fmax;
  logic [KB-1:0]        g_idx;
  logic [S-1:0][15:0]   p_unused;

  oabc_fsm #(.MAX_ITER(MAX_ITER), .ITW(ITW)) u_fsm (
    .clk, .rst_n, .start,
    .glob_done, .prob_done,
    .state, .glob_start, .prob_start, .done, .iter
  );

  for (genvar i = 0; i < S; i++) begin : g_lane
    logic [KB-1:0]     kr, k;
    logic [JB-1:0]     j;
    logic [XW-1:0]     phi;
    logic [2*XW-1:0]   x_new;
    logic              clamped;
    point_t            cand_move, cand_init, cand_opp, cand;
    logic [31:0]       init_bits;
    logic [FW-1:0]     cand_f;
    logic              load, try_en, accepted, rejected;

    lfsr16 u_rnd_a (
      .clk, .rst_n,
      .seed(seed ^ 16'(32'h9E37 * (2 * i + 1))),
      .en(1'b1), .lfsr_out(rnd_a[i])
    );
    lfsr16 u_rnd_b (
      .clk, .rst_n,
      .seed(seed ^ 16'(32'h5BD1 * (2 * i + 2))),
      .en(1'b1), .lfsr_out(rnd_b[i])
    );

    always_comb begin
      phi = rnd_a[i][XW-1:0];
      j   = rnd_a[i][XW +: JB];
      kr  = rnd_a[i][XW+JB +: KB];
      k   = (kr == KB'(i)) ? KB'((i + 1) % S) : kr;
    end

    bee_update #(.XW(XW)) u_update (
      .x_ij(pos[i][j]), .x_kj(pos[k][j]), .phi_ij(phi),
      .l_max({l_max, {XW{1'b1}}}), .x_new, .clamped
    );

    always_comb begin
      init_bits = {rnd_a[i], rnd_b[i]};
      cand_move = pos[i];
      cand_move[j] = x_new[2*XW-1:XW];   // integer part
      for (int d = 0; d < D; d++) begin
        cand_init[d] = (init_bits[d*XW +: XW] > l_max) ? l_max : init_bits[d*XW +: XW];
        cand_opp[d]  = ((pos[i][d] ^ (XW'(1) << (XW - 1))) > l_max) ? l_max
                     : (pos[i][d] ^ (XW'(1) << (XW - 1)));
      end
      unique case (state)
        ST_INIT:  cand = cand_init;
        ST_SCOUT: cand = cand_opp;
        default:  cand = cand_move;
      endcase
    end

    if (FIT_FUNC == FIT_SQUARE_SUM) begin : g_f2
      fitness_f2 u_fit (
        .x1(FIT_XW'(cand[0])), .x2(FIT_XW'(cand[1])),
        .x3(FIT_XW'(cand[2])), .x4(FIT_XW'(cand[3])), .f2(cand_f)
      );
    end else begin : g_f1
      fitness_f1 u_fit (
        .x1(FIT_XW'(cand[0])), .x2(FIT_XW'(cand[1])),
        .x3(FIT_XW'(cand[2])), .x4(FIT_XW'(cand[3])), .f1(cand_f)
      );
    end

    always_comb begin
      load   = (state == ST_INIT) ||
               (state == ST_SCOUT && tr[i] >= TRW'(MAX_TR));
      try_en = (state == ST_EMPLOY) || (state == ST_ONLOOK && onlooker[i]);
    end

    bee_individual #(.D(D), .XW(XW), .FW(FW), .TRW(TRW)) u_ind (
      .clk, .rst_n, .load, .try_en,
      .cand_x(cand), .cand_f,
      .x(pos[i]), .f(fit[i]), .tr(tr[i]),
      .accepted, .rejected
    );

    always_comb begin
      ev_accept[i]   = accepted;
      ev_reject[i]   = rejected;
      ev_clamp[i]    = try_en && clamped;
      ev_opposite[i] = (state == ST_SCOUT) && load;
    end
  end

  global_detect #(.S(S), .FW(FW)) u_global (
    .clk, .rst_n, .start(glob_start), .f_in(fit),
    .busy(glob_busy), .done(glob_done),
    .f_min(g_fmin), .f_max(g_fmax), .idx_min(g_idx)
  );

  probability_unit #(.S(S), .FW(FW)) u_prob (
    .clk, .rst_n, .start(prob_start), .f_in(fit), .f_max(g_fmax),
    .rnd(rnd_b), .busy(prob_busy), .done(prob_done),
    .p(p_unused), .onlooker
  );

  // best point of the run
  always_ff @(posedge clk) begin
    if (!rst_n) begin
      best_valid <= 1'b0;
      best_f     <= '0;
      best_x     <= '0;
    end else if (state == ST_INIT) begin
      best_valid <= 1'b0;
    end else if (glob_done && (!best_valid || g_fmin <= best_f)) begin
      best_valid <= 1'b1;
      best_f     <= g_fmin;
      best_x     <= pos[g_idx];
    end
  end

  initial begin
    assert (XW + JB + KB <= 16) else $error("random bits per lane exceed 16");
    assert (D * XW <= 32)       else $error("initial position needs more than 32 random bits");
    assert (XW <= FIT_XW)       else $error("coordinate wider than the fitness operands");
    assert (S >= 2)             else $error("a colony needs at least two bees");
  end

endmodule
