// tb_lms_pe: random signed operands in both phases; psum and dw are compared
// with products and sums formed with 64-bit integers.
module tb_lms_pe;
  localparam int L = 4, DW = 16;
  logic update;
  logic signed [L-1:0][DW-1:0] w, x;
  logic signed [DW-1:0] e;
  logic signed [2*DW+$clog2(L)-1:0] psum;
  logic signed [L-1:0][2*DW-1:0] dw;
  int checks = 0, failures = 0;

  lms_pe #(.L(L), .DW(DW)) dut (.update, .w, .x, .e, .psum, .dw);

  initial begin
    #1_000_000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int t = 0; t < 4000; t++) begin
      longint s, ex_dw;
      bit ok;
      update = (t % 2 == 1);
      for (int l = 0; l < L; l++) begin
        w[l] = (t < 4) ? 16'sh8000 : DW'($urandom());
        x[l] = (t < 4) ? 16'sh8000 : DW'($urandom());
      end
      e = DW'($urandom());
      #1;
      s = 0;
      for (int l = 0; l < L; l++) s += longint'($signed(w[l])) * longint'($signed(x[l]));
      ok = update ? (psum == 0) : (longint'(psum) == s);
      for (int l = 0; l < L; l++) begin
        ex_dw = update ? longint'(e) * longint'($signed(x[l])) : 0;
        if (longint'($signed(dw[l])) != ex_dw) ok = 0;
      end
      checks++;
      if (!ok) begin
        failures++;
        $display("FAIL t=%0d update=%0b psum=%0d exp %0d", t, update, psum, s);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
