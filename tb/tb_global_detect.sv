// tb_global_detect: random fitness sets (with ties) against a software
// min/max scan; checks the S-cycle latency of done.
module tb_global_detect;
  localparam int S = 5, FW = 32;
  logic clk = 0, rst_n = 0, start = 0;
  logic [S-1:0][FW-1:0] f_in;
  logic busy, done;
  logic [FW-1:0] f_min, f_max;
  logic [$clog2(S)-1:0] idx_min;
  int checks = 0, failures = 0;

  global_detect #(.S(S), .FW(FW)) dut (.clk, .rst_n, .start, .f_in, .busy, .done,
                                       .f_min, .f_max, .idx_min);
  always #5 clk = ~clk;

  initial begin
    #1_000_000;
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
    for (int t = 0; t < 300; t++) begin
      longint unsigned mn, mx;
      int mi, cyc;
      for (int i = 0; i < S; i++)
        f_in[i] = (t % 2 == 1) ? FW'($urandom_range(0, 7)) : $urandom();
      mn = 64'hFFFF_FFFF_FFFF; mx = 0; mi = 0;
      for (int i = 0; i < S; i++) begin
        if (f_in[i] <= mn) begin mn = f_in[i]; mi = i; end
        if (f_in[i] >= mx) mx = f_in[i];
      end
      start = 1;
      @(posedge clk); #1 start = 0;
      cyc = 0;
      while (!done && cyc < 100) begin @(posedge clk); #1 cyc++; end
      check(cyc == S, $sformatf("latency %0d", cyc));
      check(64'(f_min) == mn && 64'(f_max) == mx && int'(idx_min) == mi,
            $sformatf("t=%0d min %0d/%0d max %0d/%0d idx %0d/%0d", t, f_min, mn, f_max, mx, idx_min, mi));
      @(posedge clk); #1;
      check(!done && !busy, "done is a pulse");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
