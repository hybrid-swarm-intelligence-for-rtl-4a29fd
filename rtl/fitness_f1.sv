// fitness_f1: sphere fitness function f1(x) = x1^2 + x2^2 + x3^2 + x4^2.
//
// Four 16 x 16 multipliers square the four position coordinates and three
// 32-bit adders accumulate them in a chain ((x1^2 + x2^2) + x3^2) + x4^2,
// exactly as in the register-transfer view of f1. Operands are unsigned;
// the 32-bit sum wraps on overflow like the printed adders. Combinational.
module fitness_f1 (
  input  logic [15:0] x1,
  input  logic [15:0] x2,
  input  logic [15:0] x3,
  input  logic [15:0] x4,
  output logic [31:0] f1
);

  logic [31:0] sq1, sq2, sq3, sq4;
  logic [31:0] add0, add1;

  always_comb begin
    sq1  = 32'(x1) * 32'(x1);
    sq2  = 32'(x2) * 32'(x2);
    sq3  = 32'(x3) * 32'(x3);
    sq4  = 32'(x4) * 32'(x4);
    add0 = sq1 + sq2;
    add1 = add0 + sq3;
    f1   = add1 + sq4;
  end

endmodule
