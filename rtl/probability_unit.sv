// probability_unit: selection probabilities of the onlooker phase.
//
// For every bee i it computes p(i) = f_i / f_max as an unsigned Q0.16
// fraction and compares it with that bee's random number: onlooker[i] =
// (p(i) <= rnd[i]). With a minimised fitness a small f_i gives a small p(i)
// and therefore a high chance of being chosen for another move.
//
// The division uses a Newton-Raphson reciprocal of f_max:
//   1. f_max is normalised by its leading-zero count lz to dn in [2^31,2^32),
//      i.e. d = dn / 2^32 in [0.5, 1);
//   2. y0 = 48/17 - 32/17 * d (Q2.16), then NR_ITERS iterations of
//      y <- y * (2 - d * y), one per clock;
//   3. one bee per clock (i = i + 1): p(i) = ((f_i << lz) * y) >> 32,
//      saturated to 16'hFFFF; onlooker[i] = p(i) <= rnd[i].
// With three iterations p(i) is within a few LSB of floor(f_i*2^16/f_max).
// If f_max is zero, every p(i) is zero.
//
// Timing: `start` is a one-cycle pulse; `done` pulses 1 + NR_ITERS + S
// cycles later, when p and onlooker are valid (they hold until the next
// start). f_in and f_max must be stable from start to done; rnd[i] is
// sampled in the cycle in which bee i is scanned.
//
// The division by f_max, the comparison with per-bee random numbers and the
// use of Newton-Raphson follow the publication; the number formats, the initial
// estimate and the iteration count are design choices.
module probability_unit #(
  parameter int unsigned S        = 4,   // number of bees
  parameter int unsigned FW       = 32,  // fitness width
  parameter int unsigned NR_ITERS = 3    // Newton-Raphson iterations
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 start,
  input  logic [S-1:0][FW-1:0] f_in,
  input  logic [FW-1:0]        f_max,
  input  logic [S-1:0][15:0]   rnd,
  output logic                 busy,
  output logic                 done,
  output logic [S-1:0][15:0]   p,
  output logic [S-1:0]         onlooker
);

  localparam int unsigned IW  = (S > 1) ? $clog2(S) : 1;
  localparam int unsigned LZW = $clog2(FW + 1);
  localparam int unsigned CW  = (NR_ITERS > 1) ? $clog2(NR_ITERS + 1) : 1;
  // 48/17 and 32/17 in Q2.16
  localparam logic [17:0] C48_17 = 18'd185042;
  localparam logic [17:0] C32_17 = 18'd123362;
  localparam logic [17:0] TWO    = 18'd131072;

  typedef enum logic [1:0] {P_IDLE, P_NORM, P_ITER, P_SCAN} pstate_t;
  pstate_t state;

  logic [LZW-1:0] lz, lz_c;
  logic [FW-1:0]  dn_c;
  logic [15:0]    d16;          // normalised f_max, Q0.16
  logic [17:0]    y;            // reciprocal estimate, Q2.16
  logic [CW-1:0]  it;
  logic [IW-1:0]  i;
  logic           zero_div;

  // leading-zero count and normalisation of f_max
  always_comb begin
    lz_c = '0;
    for (int b = FW - 1; b >= 0; b--) begin
      if (f_max[b]) break;
      lz_c = lz_c + 1'b1;
    end
    dn_c = f_max << lz_c;
  end

  // one Newton-Raphson step
  logic [33:0] dy_full;
  logic [17:0] dy, corr;
  logic [35:0] y_full;
  logic [17:0] y_next;
  always_comb begin
    dy_full = 34'(d16) * 34'(y);
    dy      = dy_full[33:16];
    corr    = TWO - dy;
    y_full  = 36'(y) * 36'(corr);
    y_next  = y_full[33:16];
  end

  // initial estimate
  logic [33:0] y0_prod;
  logic [17:0] y0;
  always_comb begin
    y0_prod = 34'(C32_17) * 34'(dn_c[FW-1 -: 16]);
    y0      = C48_17 - y0_prod[33:16];
  end

  // probability of the selected bee
  logic [FW-1:0]    fn;
  logic [FW+17:0]   prod;
  logic [FW+17-32:0] p_hi;
  logic [15:0]      p_sel;
  always_comb begin
    fn    = f_in[i] << lz;
    prod  = (FW+18)'(fn) * (FW+18)'(y);
    p_hi  = prod[FW+17:32];
    if (zero_div)
      p_sel = 16'h0000;
    else if (p_hi > (FW+18-32)'(16'hFFFF))
      p_sel = 16'hFFFF;
    else
      p_sel = p_hi[15:0];
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      state    <= P_IDLE;
      busy     <= 1'b0;
      done     <= 1'b0;
      lz       <= '0;
      d16      <= '0;
      y        <= '0;
      it       <= '0;
      i        <= '0;
      zero_div <= 1'b0;
      p        <= '0;
      onlooker <= '0;
    end else begin
      done <= 1'b0;
      case (state)
        P_IDLE: if (start) begin
          state <= P_NORM;
          busy  <= 1'b1;
        end
        P_NORM: begin
          lz       <= lz_c;
          d16      <= dn_c[FW-1 -: 16];
          y        <= y0;
          zero_div <= (f_max == '0);
          it       <= '0;
          state    <= P_ITER;
        end
        P_ITER: begin
          y <= y_next;
          if (it == CW'(NR_ITERS - 1)) begin
            i     <= '0;
            state <= P_SCAN;
          end else begin
            it <= it + 1'b1;
          end
        end
        P_SCAN: begin
          p[i]        <= p_sel;
          onlooker[i] <= (p_sel <= rnd[i]);
          if (i == IW'(S - 1)) begin
            state <= P_IDLE;
            busy  <= 1'b0;
            done  <= 1'b1;
          end else begin
            i <= i + 1'b1;
          end
        end
        default: state <= P_IDLE;
      endcase
    end
  end

endmodule
