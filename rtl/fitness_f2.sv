// fitness_f2: fitness function f2(x) = (x1 + x2 + x3 + x4)^2.
//
// Three 16-bit adders form the sum in a chain ((x1 + x2) + x3) + x4 and one
// 16 x 16 multiplier squares it into a 32-bit result, as in the
// register-transfer view of f2. The adders are 16 bits wide, so the sum
// wraps modulo 2^16 before it is squared. Unsigned, combinational.
module fitness_f2 (
  input  logic [15:0] x1,
  input  logic [15:0] x2,
  input  logic [15:0] x3,
  input  logic [15:0] x4,
  output logic [31:0] f2
);

  logic [15:0] add0, add1, add2;

  always_comb begin
    add0 = x1 + x2;
    add1 = add0 + x3;
    add2 = add1 + x4;
    f2   = 32'(add2) * 32'(add2);
  end

endmodule
