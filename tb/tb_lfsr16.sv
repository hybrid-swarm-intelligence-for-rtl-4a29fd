// tb_lfsr16: checks the 16-bit LFSR against a bit-serial model of the
// polynomial x^16 + x^14 + x^13 + x^11 + 1 (Galois form), its hold when
// disabled, the zero-seed replacement and the full 65535-step period.
module tb_lfsr16;
  logic clk = 0, rst_n = 0, en = 0;
  logic [15:0] seed, q;
  int checks = 0, failures = 0;

  lfsr16 dut (.clk, .rst_n, .seed, .en, .lfsr_out(q));

  always #5 clk = ~clk;

  function automatic logic [15:0] model_step(logic [15:0] s);
    logic fb;
    logic [15:0] r;
    fb = s[0];
    r  = {1'b0, s[15:1]};
    if (fb) begin
      r[15] = 1'b1;   // x^16 term enters at the top
      r[13] = r[13] ^ 1'b1;
      r[12] = r[12] ^ 1'b1;
      r[10] = r[10] ^ 1'b1;
    end
    return r;
  endfunction

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    #2_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [15:0] m;
    int period;
    // zero seed is replaced by 1
    seed = 16'h0000; rst_n = 0;
    @(posedge clk); @(posedge clk); #1;
    check(q == 16'h0001, "zero seed");
    // seed load and model comparison
    seed = 16'hACE1;
    @(posedge clk); #1;
    check(q == 16'hACE1, "seed load");
    rst_n = 1; en = 1;
    m = 16'hACE1;
    for (int i = 0; i < 200; i++) begin
      @(posedge clk); #1;
      m = model_step(m);
      check(q == m, $sformatf("step %0d: %h vs %h", i, q, m));
    end
    // hold when disabled
    en = 0;
    repeat (5) @(posedge clk);
    #1 check(q == m, "hold while en=0");
    // full period
    en = 1;
    period = 0;
    do begin
      @(posedge clk); #1;
      period++;
      if (q == 16'h0000) begin check(0, "reached zero"); break; end
    end while (q != m && period < 70000);
    check(period == 65535, $sformatf("period %0d", period));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
