// tb_bee_update: random and corner vectors against integer arithmetic:
// delta = x_ij - x_kj taken as a signed XW-bit number,
// v = (x_ij * 2^XW + delta * phi) mod 2^(2XW); out = v <= l_max ? v : l_max.
module tb_bee_update;
  localparam int XW = 8;
  logic [XW-1:0] x_ij, x_kj, phi;
  logic [2*XW-1:0] l_max, x_new;
  logic clamped;
  int checks = 0, failures = 0;
  int n_clamp = 0, n_pass = 0;

  bee_update #(.XW(XW)) dut (.x_ij, .x_kj, .phi_ij(phi), .l_max, .x_new, .clamped);

  initial begin
    #1_000_000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic apply(int unsigned a, int unsigned b, int unsigned p, int unsigned lm);
    int dd, v, exp_v;
    bit exp_c;
    x_ij = XW'(a); x_kj = XW'(b); phi = XW'(p); l_max = (2*XW)'(lm);
    #1;
    dd = (a - b) & 32'hFF;
    if (dd >= 128) dd = dd - 256;
    v  = (a * 256 + dd * p) & 32'hFFFF;
    exp_c = (v > int'(lm));
    exp_v = exp_c ? lm : v;
    checks++;
    if (x_new != (2*XW)'(exp_v) || clamped != exp_c) begin
      failures++;
      $display("FAIL x=%0d xk=%0d phi=%0d lmax=%0d: got %0d/%0b exp %0d/%0b",
               a, b, p, lm, x_new, clamped, exp_v, exp_c);
    end
    if (exp_c) n_clamp++; else n_pass++;
  endtask

  initial begin
    apply(10, 10, 200, 65535);   // zero distance: 10.0
    apply(10, 9, 128, 65535);    // 10 + 0.5
    apply(9, 10, 128, 65535);    // 9 - 0.5
    apply(0, 100, 255, 65535);   // below zero wraps -> clamped
    apply(100, 50, 128, 31232);  // 125.0 == l_max passes
    apply(100, 50, 128, 31231);  // clamped
    for (int i = 0; i < 5000; i++)
      apply($urandom_range(0, 255), $urandom_range(0, 255), $urandom_range(0, 255),
            (i % 2 == 1) ? $urandom_range(0, 65535) : $urandom_range(0, 255));
    checks++;
    if (n_clamp == 0 || n_pass == 0) begin failures++; $display("FAIL coverage"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
