// tb_probability_unit: p(i) = f_i / f_max (Q0.16) against exact integer
// division (tolerance 4 LSB), onlooker(i) = p(i) <= rnd(i), the zero-f_max
// case and the 1 + NR_ITERS + S cycle latency.
module tb_probability_unit;
  localparam int S = 4, FW = 32, NR = 3;
  logic clk = 0, rst_n = 0, start = 0;
  logic [S-1:0][FW-1:0] f_in;
  logic [FW-1:0] f_max;
  logic [S-1:0][15:0] rnd, p;
  logic [S-1:0] onlooker;
  logic busy, done;
  int checks = 0, failures = 0, worst = 0, n_sel = 0, n_nsel = 0;

  probability_unit #(.S(S), .FW(FW), .NR_ITERS(NR)) dut (
    .clk, .rst_n, .start, .f_in, .f_max, .rnd, .busy, .done, .p, .onlooker);
  always #5 clk = ~clk;

  initial begin
    #2_000_000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    for (int t = 0; t < 400; t++) begin
      longint unsigned mx;
      int cyc;
      int range_sel;
      range_sel = t % 4;
      for (int i = 0; i < S; i++) begin
        case (range_sel)
          0: f_in[i] = $urandom();
          1: f_in[i] = FW'($urandom_range(0, 300));
          2: f_in[i] = FW'($urandom_range(1, 3));
          default: f_in[i] = (t < 8) ? '0 : FW'($urandom_range(0, 65535) * 17);
        endcase
        rnd[i] = 16'($urandom());
      end
      mx = 0;
      for (int i = 0; i < S; i++) if (f_in[i] > mx) mx = f_in[i];
      f_max = FW'(mx);
      start = 1;
      @(posedge clk); #1 start = 0;
      cyc = 0;
      while (!done && cyc < 100) begin @(posedge clk); #1 cyc++; end
      check(cyc == 1 + NR + S, $sformatf("latency %0d", cyc));
      for (int i = 0; i < S; i++) begin
        longint unsigned ex;
        int diff;
        ex = (mx == 0) ? 0 : (64'(f_in[i]) << 16) / mx;
        if (ex > 65535) ex = 65535;
        diff = int'(longint'(p[i]) - longint'(ex));
        if (diff < 0) diff = -diff;
        if (diff > worst) worst = diff;
        check(diff <= 4, $sformatf("t=%0d p[%0d]=%0d exact %0d (f=%0d fmax=%0d)", t, i, p[i], ex, f_in[i], mx));
        check(onlooker[i] == (p[i] <= rnd[i]), "onlooker compare");
        if (onlooker[i]) n_sel++; else n_nsel++;
      end
    end
    check(n_sel > 0 && n_nsel > 0, "both selection outcomes");
    $display("largest probability error %0d LSB", worst);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
