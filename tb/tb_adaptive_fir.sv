// tb_adaptive_fir: drives random samples through the filter and compares y,
// e and all weights with the bit-accurate integer model after every sample;
// checks the 3-cycle sample interval, the 2-cycle latency and that the
// filter identifies a known FIR channel (error energy falls).
module tb_adaptive_fir;
  import fir_ref_pkg::*;
  localparam int N = 8, L = 4, DW = 16;
  logic clk = 0, rst_n = 0, in_valid = 0, in_ready, out_valid;
  logic signed [DW-1:0] x_in, d_in, y, e;
  logic [15:0] mu;
  logic signed [N-1:0][DW-1:0] w;
  int checks = 0, failures = 0, n_sat = 0;
  // unknown channel to identify (Q1.15)
  int h[N] = '{6000, -4000, 3000, 2000, -1500, 800, 400, -200};

  adaptive_fir #(.N(N), .L(L), .DW(DW)) dut (.clk, .rst_n, .in_valid, .in_ready, .x_in, .d_in,
                                             .mu, .out_valid, .y, .e, .w);
  always #5 clk = ~clk;

  initial begin
    #10_000_000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    fir_model m;
    longint hist[N];
    longint e_early, e_late;
    m = new(N);
    foreach (hist[i]) hist[i] = 0;
    e_early = 0; e_late = 0;
    mu = 16'h4000;
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    for (int t = 0; t < 1200; t++) begin
      longint xs, ds;
      int cyc;
      if (t < 20) xs = (t % 2 == 1) ? 32767 : -32768;   // drives saturation
      else xs = longint'($urandom_range(0, 16000)) - 8000;
      for (int i = N - 1; i > 0; i--) hist[i] = hist[i-1];
      hist[0] = xs;
      ds = 0;
      for (int i = 0; i < N; i++) ds += h[i] * hist[i];
      ds = fir_model::fdiv(ds, 15) + longint'($urandom_range(0, 40)) - 20;
      if (t < 20) ds = (t % 2 == 1) ? -32768 : 32767;
      check(in_ready, "ready before sample");
      x_in = DW'(xs); d_in = DW'(ds); in_valid = 1;
      @(posedge clk); #1 in_valid = 0;
      check(!in_ready, "busy after accept");
      cyc = 0;
      while (!out_valid && cyc < 10) begin @(posedge clk); #1 cyc++; end
      check(cyc == 1, $sformatf("latency %0d", cyc + 1));
      m.step(xs, ds, longint'(mu));
      check(longint'(y) == m.y && longint'(e) == m.e,
            $sformatf("t=%0d y=%0d/%0d e=%0d/%0d", t, y, m.y, e, m.e));
      if (m.e == 32767 || m.e == -32768 || m.y == 32767 || m.y == -32768) n_sat++;
      @(posedge clk); #1;
      check(in_ready, "ready after 3 cycles");
      for (int i = 0; i < N; i++)
        check(longint'($signed(w[i])) == m.w[i], $sformatf("t=%0d w[%0d]=%0d/%0d", t, i, w[i], m.w[i]));
      if (t >= 20 && t < 120) e_early += m.e * m.e;
      if (t >= 1100) e_late += m.e * m.e;
      if (t == 19) begin
        // restart adaptation from zero after the saturation test
        rst_n = 0; @(posedge clk); #1 rst_n = 1;
        m = new(N);
      end
    end
    check(n_sat > 0, "saturation exercised");
    check(e_late * 4 < e_early, $sformatf("error energy %0d -> %0d", e_early, e_late));
    $display("error energy first 100 %0d, last 100 %0d", e_early, e_late);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
