// tb_fitness_f1: random and corner operands against the fitness function
// computed with 64-bit integers and reduced as the hardware widths require.
module tb_fitness_f1;
  logic [15:0] x1, x2, x3, x4;
  logic [31:0] f;
  int checks = 0, failures = 0;

  fitness_f1 dut (.x1, .x2, .x3, .x4, .f1(f));

  initial begin
    #1_000_000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic longint unsigned model(int unsigned a, b, c, d);
    return (64'(a)*a + 64'(b)*b + 64'(c)*c + 64'(d)*d) & 64'hFFFF_FFFF;
  endfunction

  task automatic apply(int unsigned a, b, c, d);
    longint unsigned exp_f;
    x1 = 16'(a); x2 = 16'(b); x3 = 16'(c); x4 = 16'(d);
    #1;
    exp_f = model(a, b, c, d);
    checks++;
    if (64'(f) != exp_f) begin
      failures++;
      $display("FAIL %0d %0d %0d %0d: got %0d exp %0d", a, b, c, d, f, exp_f);
    end
  endtask

  initial begin
    apply(0, 0, 0, 0);
    apply(1, 2, 3, 4);
    apply(65535, 65535, 65535, 65535);
    apply(0, 0, 0, 65535);
    apply(255, 0, 17, 3);
    for (int i = 0; i < 5000; i++)
      apply($urandom_range(0, 65535), $urandom_range(0, 65535),
            $urandom_range(0, 65535), $urandom_range(0, 65535));
    for (int i = 0; i < 1000; i++)
      apply($urandom_range(0, 255), $urandom_range(0, 255),
            $urandom_range(0, 255), $urandom_range(0, 255));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
