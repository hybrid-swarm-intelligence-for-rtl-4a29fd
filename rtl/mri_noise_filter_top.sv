// mri_noise_filter_top: swarm-tuned adaptive noise filter.
//
// Two subsystems work side by side:
//   - oabc_core, the parallel opposition-based artificial bee colony
//     optimizer, runs one optimisation of MAX_ITER iterations per opt_start
//     pulse and reports the best point it found (opt_best_x, opt_best_f);
//   - adaptive_fir, the N-tap LMS noise filter, which cleans a sample stream
//     x_in against a desired/reference stream d_in and reports the filter
//     output y and the error e.
// They are coupled through the step size: the LMS step size mu starts at
// MU_INIT after reset and, at the end of every optimisation run, is loaded
// with the first coordinate of the best point, mu = {best_x[0], 8'h00}
// (Q0.16). The filter keeps running with the previous step size while the
// optimizer works. `mu_loads` counts the step-size updates (wraps at 2^8).
//
// That the swarm optimiser sets the step size of the adaptive filter is
// taken from the publication; the exact mapping of the optimum onto mu, the
// reset step size and all sizes are design choices.
module mri_noise_filter_top
  import oabc_pkg::*;
#(
  parameter int unsigned S        = 4,
  parameter int unsigned XW       = 8,
  parameter int unsigned MAX_ITER = 32,
  parameter int unsigned MAX_TR   = 8,
  parameter int unsigned FIT_FUNC = FIT_SPHERE,
  parameter int unsigned N        = 8,
  parameter int unsigned L        = 4,
  parameter int unsigned DW       = 16,
  parameter logic [15:0] MU_INIT  = 16'h2000
) (
  input  logic                        clk,
  input  logic                        rst_n,
  // optimizer
  input  logic                        opt_start,
  input  logic [15:0]                 seed,
  input  logic [XW-1:0]               l_max,
  output oabc_state_t                 opt_state,
  output logic                        opt_done,
  output logic [FIT_FW-1:0]           opt_best_f,
  output logic [3:0][XW-1:0]          opt_best_x,
  output logic [S-1:0]                ev_accept,
  output logic [S-1:0]                ev_reject,
  output logic [S-1:0]                ev_clamp,
  output logic [S-1:0]                ev_opposite,
  output logic [S-1:0]                onlooker,
  // filter
  input  logic                        in_valid,
  output logic                        in_ready,
  input  logic signed [DW-1:0]        x_in,
  input  logic signed [DW-1:0]        d_in,
  output logic                        out_valid,
  output logic signed [DW-1:0]        y,
  output logic signed [DW-1:0]        e,
  output logic signed [N-1:0][DW-1:0] w,
  output logic [15:0]                 mu,
  output logic [7:0]                  mu_loads
);

  logic [15:0] iter_unused;
  logic        best_valid;
  logic        done_q;

  oabc_core #(
    .S(S), .XW(XW), .MAX_ITER(MAX_ITER), .MAX_TR(MAX_TR),
    .FIT_FUNC(FIT_FUNC)
  ) u_core (
    .clk, .rst_n, .start(opt_start), .seed, .l_max,
    .state(opt_state), .iter(iter_unused), .done(opt_done),
    .best_valid, .best_f(opt_best_f), .best_x(opt_best_x),
    .ev_accept, .ev_reject, .ev_clamp, .ev_opposite, .onlooker
  );

  // step-size register, loaded on the rising edge of opt_done
  always_ff @(posedge clk) begin
    if (!rst_n) begin
      mu       <= MU_INIT;
      mu_loads <= '0;
      done_q   <= 1'b0;
    end else begin
      done_q <= opt_done;
      if (opt_done && !done_q && best_valid) begin
        mu       <= 16'(opt_best_x[0]) << (16 - XW);
        mu_loads <= mu_loads + 1'b1;
      end
    end
  end

  adaptive_fir #(.N(N), .L(L), .DW(DW)) u_fir (
    .clk, .rst_n, .in_valid, .in_ready, .x_in, .d_in, .mu,
    .out_valid, .y, .e, .w
  );

endmodule
