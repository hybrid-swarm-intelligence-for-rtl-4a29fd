// tb_mri_noise_filter_top: end-to-end test of the swarm-tuned noise filter
// with every parameter at its default.
//   - A noisy sample stream runs through the adaptive filter the whole time;
//     y, e and all weights are compared with the bit-accurate LMS model after
//     every sample, using the step size the design is expected to hold.
//   - Two optimisation runs (different seeds and limits) run while the
//     filter works. Each must take 2 + MAX_ITER*(2S+NR+6) + S cycles, end
//     with best_f = f1(best_x) and best_x within l_max, and load
//     mu = {best_x[0], 8'h00} one cycle after done rises.
//   - Every mechanism is counted and must occur: greedy accept and reject,
//     l_max clamp, onlooker selection, opposition step, global scan,
//     probability scan, step-size load, filter step with the reset step
//     size and with an optimised one, filter error energy falling.
module tb_mri_noise_filter_top;
  import oabc_pkg::*;
  import fir_ref_pkg::*;
  localparam int S = 4, XW = 8, MAX_ITER = 32, NR = 3, N = 8, DW = 16;
  localparam logic [15:0] MU_INIT = 16'h2000;

  logic clk = 0, rst_n = 0, opt_start = 0, in_valid = 0;
  logic [15:0] seed;
  logic [XW-1:0] l_max;
  oabc_state_t opt_state;
  logic opt_done, in_ready, out_valid;
  logic [31:0] opt_best_f;
  logic [3:0][XW-1:0] opt_best_x;
  logic [S-1:0] ev_accept, ev_reject, ev_clamp, ev_opposite, onlooker;
  logic signed [DW-1:0] x_in, d_in, y, e;
  logic signed [N-1:0][DW-1:0] w;
  logic [15:0] mu;
  logic [7:0] mu_loads;

  int checks = 0, failures = 0;
  int n_acc = 0, n_rej = 0, n_clamp = 0, n_opp = 0, n_onl = 0, n_glob = 0, n_prob = 0;
  int n_mu_load = 0, n_init_mu = 0, n_opt_mu = 0;
  logic [15:0] mu_exp;
  bit filter_stop = 0;

  mri_noise_filter_top dut (
    .clk, .rst_n, .opt_start, .seed, .l_max, .opt_state, .opt_done, .opt_best_f,
    .opt_best_x, .ev_accept, .ev_reject, .ev_clamp, .ev_opposite, .onlooker,
    .in_valid, .in_ready, .x_in, .d_in, .out_valid, .y, .e, .w, .mu, .mu_loads
  );

  always #5 clk = ~clk;

  initial begin
    #20_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL: %s", what); end
  endtask

  // mechanism counters
  oabc_state_t st_q = ST_IDLE;
  always @(posedge clk) if (rst_n) begin
    n_acc   += $countones(ev_accept);
    n_rej   += $countones(ev_reject);
    n_clamp += $countones(ev_clamp);
    n_opp   += $countones(ev_opposite);
    if (opt_state == ST_ONLOOK) n_onl += $countones(onlooker);
    if ((opt_state == ST_GLOBAL || opt_state == ST_FINAL) && st_q != opt_state) n_glob++;
    if (opt_state == ST_PROB && st_q != ST_PROB) n_prob++;
    st_q <= opt_state;
  end

  // expected step size: MU_INIT after reset, {best_x[0], 8'h00} from the
  // cycle after done rises
  logic done_q = 0;
  always @(posedge clk) begin
    if (!rst_n) begin
      mu_exp <= MU_INIT;
      done_q <= 0;
    end else begin
      done_q <= opt_done;
      if (opt_done && !done_q) begin
        mu_exp <= {opt_best_x[0], 8'h00};
        n_mu_load++;
      end
    end
  end
  always @(negedge clk) if (rst_n) check(mu == mu_exp, $sformatf("mu %h expected %h", mu, mu_exp));

  // filter stream
  int h[N] = '{5000, -3000, 2500, 1800, -1200, 700, 300, -150};
  longint e_early = 0, e_late = 0;
  int n_samples = 0;
  initial begin
    fir_model m;
    longint hist[N];
    m = new(N);
    foreach (hist[i]) hist[i] = 0;
    wait (rst_n);
    while (!filter_stop) begin
      longint xs, ds, mu_used;
      int cyc;
      @(posedge clk); #1;
      if (!in_ready) continue;
      xs = longint'($urandom_range(0, 16000)) - 8000;
      for (int i = N - 1; i > 0; i--) hist[i] = hist[i-1];
      hist[0] = xs;
      ds = 0;
      for (int i = 0; i < N; i++) ds += h[i] * hist[i];
      ds = fir_model::fdiv(ds, 15) + longint'($urandom_range(0, 60)) - 30;
      x_in = DW'(xs); d_in = DW'(ds); in_valid = 1;
      @(posedge clk); #1 in_valid = 0;
      mu_used = longint'(mu_exp);       // step size seen in the filter phase
      if (mu_exp == MU_INIT) n_init_mu++; else n_opt_mu++;
      @(posedge clk); #1;
      check(out_valid, "out_valid 2 cycles after accept");
      m.step(xs, ds, mu_used);
      check(longint'(y) == m.y && longint'(e) == m.e,
            $sformatf("sample %0d y=%0d/%0d e=%0d/%0d", n_samples, y, m.y, e, m.e));
      @(posedge clk); #1;
      for (int i = 0; i < N; i++)
        check(longint'($signed(w[i])) == m.w[i], $sformatf("sample %0d w[%0d]", n_samples, i));
      if (n_samples < 100) e_early += m.e * m.e;
      if (n_samples >= 1000 && n_samples < 1100) e_late += m.e * m.e;
      n_samples++;
    end
  end

  task automatic run_opt(logic [15:0] sd, logic [XW-1:0] lm, int run);
    int cyc, exp_cyc;
    longint unsigned ef;
    seed = sd; l_max = lm;
    opt_start = 1; @(posedge clk); #1 opt_start = 0;
    cyc = 0;
    while (!opt_done && cyc < 5000) begin @(posedge clk); #1 cyc++; end
    exp_cyc = 2 + MAX_ITER * (2 * S + NR + 6) + S;
    check(cyc == exp_cyc, $sformatf("run %0d length %0d expected %0d", run, cyc, exp_cyc));
    ef = 64'(opt_best_x[0])*opt_best_x[0] + 64'(opt_best_x[1])*opt_best_x[1] +
         64'(opt_best_x[2])*opt_best_x[2] + 64'(opt_best_x[3])*opt_best_x[3];
    check(64'(opt_best_f) == ef, $sformatf("run %0d best_f %0d vs f1(best_x) %0d", run, opt_best_f, ef));
    for (int d = 0; d < 4; d++) check(opt_best_x[d] <= lm, "best_x within l_max");
    @(posedge clk); #1;
    check(mu == {opt_best_x[0], 8'h00} && int'(mu_loads) == run + 1,
          $sformatf("run %0d step size %h loads %0d", run, mu, mu_loads));
    $display("run %0d: best f1 = %0d at (%0d,%0d,%0d,%0d), mu = 0x%h",
             run, opt_best_f, opt_best_x[0], opt_best_x[1], opt_best_x[2], opt_best_x[3], mu);
  endtask

  initial begin
    seed = 16'hBEEF; l_max = 8'd250;
    repeat (3) @(posedge clk);
    #1 rst_n = 1;
    repeat (1500) @(posedge clk);       // filter alone with the reset step size
    #1 run_opt(16'hBEEF, 8'd250, 0);
    repeat (600) @(posedge clk);
    #1 run_opt(16'h5A5A, 8'd120, 1);
    repeat (1500) @(posedge clk);
    filter_stop = 1;
    repeat (10) @(posedge clk);
    check(n_acc > 0,     $sformatf("greedy accept %0d", n_acc));
    check(n_rej > 0,     $sformatf("greedy reject %0d", n_rej));
    check(n_clamp > 0,   $sformatf("l_max clamp %0d", n_clamp));
    check(n_onl > 0,     $sformatf("onlooker %0d", n_onl));
    check(n_opp > 0,     $sformatf("opposition %0d", n_opp));
    check(n_glob == 2 * (MAX_ITER + 1), $sformatf("global scans %0d", n_glob));
    check(n_prob == 2 * MAX_ITER, $sformatf("probability scans %0d", n_prob));
    check(n_mu_load == 2, $sformatf("step-size loads %0d", n_mu_load));
    check(n_init_mu > 0 && n_opt_mu > 0, "filter ran with both step sizes");
    check(e_late * 4 < e_early, $sformatf("filter error energy %0d -> %0d", e_early, e_late));
    $display("mechanisms: accept %0d reject %0d clamp %0d onlooker %0d opposition %0d",
             n_acc, n_rej, n_clamp, n_onl, n_opp);
    $display("global scans %0d probability scans %0d mu loads %0d", n_glob, n_prob, n_mu_load);
    $display("filter samples %0d (reset mu %0d, optimised mu %0d), error energy %0d -> %0d",
             n_samples, n_init_mu, n_opt_mu, e_early, e_late);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
