// tb_bee_individual: random load / try sequences against a behavioural
// model of the register-bank entry (greedy <= selection, trial counter,
// load priority, counter saturation).
module tb_bee_individual;
  localparam int D = 4, XW = 8, FW = 32, TRW = 3;
  logic clk = 0, rst_n = 0, load = 0, try_en = 0;
  logic [D-1:0][XW-1:0] cand_x, x;
  logic [FW-1:0] cand_f, f;
  logic [TRW-1:0] tr;
  logic accepted, rejected;
  int checks = 0, failures = 0, n_acc = 0, n_rej = 0, n_sat = 0;

  bee_individual #(.D(D), .XW(XW), .FW(FW), .TRW(TRW)) dut (
    .clk, .rst_n, .load, .try_en, .cand_x, .cand_f, .x, .f, .tr, .accepted, .rejected);

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
    logic [D-1:0][XW-1:0] mx;
    logic [FW-1:0] mf;
    int mtr;
    bit exp_acc, exp_rej;
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    check(tr == 0, "reset counter");
    mx = x; mf = f; mtr = 0;
    for (int i = 0; i < 3000; i++) begin
      int r;
      r = $urandom_range(0, 9);
      load   = (r == 0);
      try_en = (r >= 3);
      cand_x = {$urandom(), $urandom()};
      cand_f = (i % 3 == 0) ? mf : FW'($urandom_range(0, 1000));
      if (i >= 1000 && i < 1100) begin load = 0; cand_f = mf + 1; end  // run of rejections
      #1;
      exp_acc = try_en && !load && (cand_f <= mf);
      exp_rej = try_en && !load && !(cand_f <= mf);
      check(accepted == exp_acc && rejected == exp_rej, $sformatf("flags at %0d", i));
      @(posedge clk);
      if (load || exp_acc) begin mx = cand_x; mf = cand_f; mtr = 0; end
      else if (exp_rej) begin
        if (mtr == (1 << TRW) - 1) n_sat++; else mtr++;
      end
      if (exp_acc) n_acc++;
      if (exp_rej) n_rej++;
      #1;
      check(x == mx && f == mf && int'(tr) == mtr,
            $sformatf("state at %0d: f=%0d/%0d tr=%0d/%0d", i, f, mf, tr, mtr));
    end
    check(n_acc > 0 && n_rej > 0 && n_sat > 0, "coverage");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
