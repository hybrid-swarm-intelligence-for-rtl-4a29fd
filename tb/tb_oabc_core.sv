// tb_oabc_core: runs the parallel OABC optimizer and checks every lane,
// every cycle, against an independent model:
//   - stored fitness = f(stored position), positions within l_max;
//   - in the employed and onlooker phases the candidate is rebuilt from the
//     lane's random word (phi, j, k as documented), the move formula and the
//     fitness; accept/reject and the new position / trial counter follow;
//   - the opposition step inverts the coordinate MSBs (limited to l_max) of
//     exactly the bees whose trial counter reached MAX_TR;
//   - best_f = f(best_x) and best_f <= every final fitness;
//   - run length = 2 + MAX_ITER*(2S+NR+6) + S cycles (start to done);
//   - the run improves on its first global scan.
// Two instances are run, one with f1 (sphere) and one with f2.
module tb_oabc_core;
  import oabc_pkg::*;
  localparam int S = 4, XW = 8, MAX_ITER = 24, MAX_TR = 3, NR = 3;
  logic clk = 0, rst_n = 0, start = 0;
  logic [15:0] seed = 16'h1234;
  logic [XW-1:0] l_max = 8'd200;
  int checks = 0, failures = 0;
  int n_acc = 0, n_rej = 0, n_clamp = 0, n_opp = 0, n_onl = 0;

  always #5 clk = ~clk;

  initial begin
    #5_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL: %s", what); end
  endtask

  function automatic longint unsigned fit(int func, logic [3:0][XW-1:0] x);
    longint unsigned s;
    if (func == 2) begin
      s = (64'(x[0]) + x[1] + x[2] + x[3]) % 65536;
      return s * s;
    end
    return 64'(x[0])*x[0] + 64'(x[1])*x[1] + 64'(x[2])*x[2] + 64'(x[3])*x[3];
  endfunction

  // ---------------------------------------------------------------- DUTs
  oabc_state_t st [2];
  logic [15:0] iter [2];
  logic done [2], bvalid [2];
  logic [31:0] best_f [2];
  logic [3:0][XW-1:0] best_x [2];
  logic [S-1:0] ev_acc [2], ev_rej [2], ev_clamp [2], ev_opp [2], onl [2];

  for (genvar u = 0; u < 2; u++) begin : g_dut
    oabc_core #(.S(S), .XW(XW), .MAX_ITER(MAX_ITER), .MAX_TR(MAX_TR),
                .FIT_FUNC(u + 1)) dut (
      .clk, .rst_n, .start, .seed(seed ^ 16'(u * 16'h0F0F)), .l_max,
      .state(st[u]), .iter(iter[u]), .done(done[u]), .best_valid(bvalid[u]),
      .best_f(best_f[u]), .best_x(best_x[u]),
      .ev_accept(ev_acc[u]), .ev_reject(ev_rej[u]), .ev_clamp(ev_clamp[u]),
      .ev_opposite(ev_opp[u]), .onlooker(onl[u])
    );

    // per-lane checker
    for (genvar i = 0; i < S; i++) begin : g_chk
      always @(posedge clk) if (rst_n) begin
        logic [3:0][XW-1:0] px, cand;
        logic [15:0] r;
        int j, k, kr, phi, dd, v;
        bit clampv, active, acc;
        longint unsigned fc, fo;
        int tr_old;
        px     = g_dut[u].dut.g_lane[i].u_ind.x;
        fo     = 64'(g_dut[u].dut.g_lane[i].u_ind.f);
        tr_old = int'(g_dut[u].dut.g_lane[i].u_ind.tr);
        r      = g_dut[u].dut.rnd_a[i];
        // invariants on the stored entry
        if (st[u] != ST_IDLE && st[u] != ST_INIT) begin
          check(fo == fit(u + 1, px), $sformatf("u%0d lane %0d stored fitness", u, i));
          for (int d = 0; d < 4; d++)
            check(px[d] <= l_max, $sformatf("u%0d lane %0d coordinate above l_max", u, i));
        end
        active = (st[u] == ST_EMPLOY) || (st[u] == ST_ONLOOK && onl[u][i]);
        if (active) begin
          phi = int'(r[7:0]);
          j   = int'(r[9:8]);
          kr  = int'(r[11:10]);
          k   = (kr == i) ? (i + 1) % S : kr;
          dd  = (int'(px[j]) - int'(g_dut[u].dut.pos[k][j])) & 255;
          if (dd >= 128) dd -= 256;
          v   = (int'(px[j]) * 256 + dd * phi) & 65535;   // 8.8 fixed point
          clampv = v > int'(l_max) * 256 + 255;
          cand = px;
          cand[j] = clampv ? l_max : XW'(v >> 8);
          fc  = fit(u + 1, cand);
          acc = (fc <= fo);
          check(ev_acc[u][i] == acc && ev_rej[u][i] == !acc,
                $sformatf("u%0d lane %0d decision", u, i));
          check(ev_clamp[u][i] == clampv, $sformatf("u%0d lane %0d clamp", u, i));
          if (acc) n_acc++; else n_rej++;
          if (clampv) n_clamp++;
          if (st[u] == ST_ONLOOK) n_onl++;
          #1;
          if (acc)
            check(g_dut[u].dut.g_lane[i].u_ind.x == cand &&
                  g_dut[u].dut.g_lane[i].u_ind.tr == 0, $sformatf("u%0d lane %0d accept", u, i));
          else
            check(g_dut[u].dut.g_lane[i].u_ind.x == px &&
                  int'(g_dut[u].dut.g_lane[i].u_ind.tr) == tr_old + 1,
                  $sformatf("u%0d lane %0d reject", u, i));
        end else if (st[u] == ST_SCOUT) begin
          bit exh;
          exh = tr_old >= MAX_TR;
          check(ev_opp[u][i] == exh, $sformatf("u%0d lane %0d opposition flag", u, i));
          for (int d = 0; d < 4; d++) begin
            int o;
            o = int'(px[d]) ^ (1 << (XW - 1));
            cand[d] = (o > int'(l_max)) ? l_max : XW'(o);
          end
          if (exh) n_opp++;
          #1;
          if (exh)
            check(g_dut[u].dut.g_lane[i].u_ind.x == cand &&
                  g_dut[u].dut.g_lane[i].u_ind.tr == 0, $sformatf("u%0d lane %0d opposite", u, i));
          else
            check(g_dut[u].dut.g_lane[i].u_ind.x == px, $sformatf("u%0d lane %0d kept", u, i));
        end else if (st[u] != ST_INIT && st[u] != ST_IDLE) begin
          #1;
          check(g_dut[u].dut.g_lane[i].u_ind.x == px, $sformatf("u%0d lane %0d idle hold", u, i));
        end
      end
    end
  end

  // ------------------------------------------------------------ stimulus
  initial begin
    int cyc, exp_cyc;
    longint unsigned first_best [2];
    repeat (3) @(posedge clk);
    #1 rst_n = 1;
    for (int run = 0; run < 2; run++) begin
      first_best[0] = 0; first_best[1] = 0;
      start = 1; @(posedge clk); #1 start = 0;
      cyc = 0;
      while (!(done[0] && done[1]) && cyc < 10000) begin
        @(posedge clk); #1 cyc++;
        for (int u = 0; u < 2; u++)
          if (bvalid[u] && first_best[u] == 0) first_best[u] = 64'(best_f[u]) + 1;
      end
      exp_cyc = 2 + MAX_ITER * (2 * S + NR + 6) + S;
      check(cyc == exp_cyc, $sformatf("run length %0d, expected %0d", cyc, exp_cyc));
      for (int u = 0; u < 2; u++) begin
        longint unsigned mn;
        check(bvalid[u], "best valid");
        check(64'(best_f[u]) == fit(u + 1, best_x[u]), $sformatf("u%0d best_f = f(best_x)", u));
        mn = 64'hFFFF_FFFF;
        if (u == 0) begin
          if (g_dut[0].dut.g_lane[0].u_ind.f < mn) mn = g_dut[0].dut.g_lane[0].u_ind.f;
          if (g_dut[0].dut.g_lane[1].u_ind.f < mn) mn = g_dut[0].dut.g_lane[1].u_ind.f;
          if (g_dut[0].dut.g_lane[2].u_ind.f < mn) mn = g_dut[0].dut.g_lane[2].u_ind.f;
          if (g_dut[0].dut.g_lane[3].u_ind.f < mn) mn = g_dut[0].dut.g_lane[3].u_ind.f;
        end else begin
          if (g_dut[1].dut.g_lane[0].u_ind.f < mn) mn = g_dut[1].dut.g_lane[0].u_ind.f;
          if (g_dut[1].dut.g_lane[1].u_ind.f < mn) mn = g_dut[1].dut.g_lane[1].u_ind.f;
          if (g_dut[1].dut.g_lane[2].u_ind.f < mn) mn = g_dut[1].dut.g_lane[2].u_ind.f;
          if (g_dut[1].dut.g_lane[3].u_ind.f < mn) mn = g_dut[1].dut.g_lane[3].u_ind.f;
        end
        check(64'(best_f[u]) <= mn, $sformatf("u%0d best below final colony", u));
        check(64'(best_f[u]) + 1 < first_best[u],
              $sformatf("u%0d improved: first %0d final %0d", u, first_best[u] - 1, best_f[u]));
        $display("run %0d f%0d: first scan best %0d, final best %0d at (%0d,%0d,%0d,%0d)",
                 run, u + 1, first_best[u] - 1, best_f[u],
                 best_x[u][0], best_x[u][1], best_x[u][2], best_x[u][3]);
      end
      repeat (3) @(posedge clk);
      #1;
    end
    check(n_acc > 0 && n_rej > 0 && n_clamp > 0 && n_opp > 0 && n_onl > 0,
          $sformatf("coverage acc=%0d rej=%0d clamp=%0d opp=%0d onl=%0d",
                    n_acc, n_rej, n_clamp, n_opp, n_onl));
    $display("events: accepted %0d rejected %0d clamped %0d opposition %0d onlooker moves %0d",
             n_acc, n_rej, n_clamp, n_opp, n_onl);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
