// lfsr16: 16-bit random number generator for the bee lanes.
//
// A Galois linear-feedback shift register with the maximal-length polynomial
// x^16 + x^14 + x^13 + x^11 + 1 (period 65535). The register is loaded with
// `seed` while reset is asserted; a zero seed, which would lock the register,
// is replaced by 16'h0001. While `en` is high the register advances one step
// per clock; `lfsr_out` is the register itself, so a new value is visible the
// cycle after each enabled edge.
//
// The 16-bit width and the clock/reset/lfsr_out interface follow the
// random-number blocks of the bee-update schematic; the polynomial, the
// Galois form and the seed handling are this design's choices.
module lfsr16 (
  input  logic        clk,
  input  logic        rst_n,     // active-low synchronous reset, loads seed
  input  logic [15:0] seed,      // initial seed
  input  logic        en,        // advance one step
  output logic [15:0] lfsr_out   // current pseudo-random value
);

  localparam logic [15:0] TAPS = 16'hB400;

  always_ff @(posedge clk) begin
    if (!rst_n)
      lfsr_out <= (seed == 16'h0000) ? 16'h0001 : seed;
    else if (en)
      lfsr_out <= lfsr_out[0] ? ((lfsr_out >> 1) ^ TAPS) : (lfsr_out >> 1);
  end

endmodule
