// bee_update: candidate position of one bee in one dimension.
//
// The ABC neighbour move v_ij = x_ij + phi_ij * (x_ij - x_kj), computed in
// four combinational stages as in the bee-position-update architecture:
//   distance   : x_ij - x_kj, an XW+1-bit adder fed with x_ij, the complement
//                of x_kj and a carry-in of one; its low XW bits are used as a
//                two's-complement distance (exact for |x_ij - x_kj| < 2^(XW-1));
//   mutate     : distance (signed, XW bits) times phi_ij (unsigned fraction
//                phi_ij / 2^XW in [0, 1)), a 2*XW-bit signed product with XW
//                fractional bits;
//   add        : product plus x_ij placed in the upper half of a 2*XW-bit word
//                ({x_ij, XW zero bits}), i.e. a fixed-point sum with XW
//                fractional bits that wraps modulo 2^(2*XW);
//   comparator : the sum is compared with l_max (<=); a multiplexer passes
//                the sum when it is within the limit and l_max otherwise.
// x_new carries XW integer and XW fraction bits (XW = 8: xij[7..0] in,
// xij_update[15..0] out); its upper half is the new integer coordinate. A
// move below zero wraps to a large value and is therefore replaced by l_max.
// `clamped` reports that the limit was applied. Purely combinational.
//
// The stages, the operand widths and the l_max comparator follow the
// published update architecture. Which half of the adder operand the zero
// byte fills, the signed use of the distance and the fractional phi are this
// design's reading of it; taking l_max (rather than a second random value)
// as the out-of-range replacement follows the block diagram.
module bee_update #(
  parameter int unsigned XW = 8   // position / phi width
) (
  input  logic [XW-1:0]   x_ij,     // own position, dimension j
  input  logic [XW-1:0]   x_kj,     // neighbour k, dimension j
  input  logic [XW-1:0]   phi_ij,   // random mutation factor, Q0.XW
  input  logic [2*XW-1:0] l_max,    // upper limit, XW.XW fixed point
  output logic [2*XW-1:0] x_new,    // updated position (xij_update), XW.XW
  output logic            clamped   // 1: sum exceeded l_max, l_max passed
);

  logic [XW:0]            distance;
  logic signed [2*XW-1:0] mutate;
  logic [2*XW-1:0]        sum;
  logic                   in_range;

  always_comb begin
    distance = {1'b0, x_ij} + {1'b0, ~x_kj} + {{XW{1'b0}}, 1'b1};
    mutate   = (2*XW)'($signed(distance[XW-1:0])) * $signed({{XW{1'b0}}, phi_ij});
    sum      = {x_ij, {XW{1'b0}}} + mutate;
    in_range = (sum <= l_max);
    x_new    = in_range ? sum : l_max;
    clamped  = !in_range;
  end

endmodule
