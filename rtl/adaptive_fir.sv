// adaptive_fir: N-tap adaptive FIR noise filter with LMS weight update.
//
// Per input sample (x_in, desired d_in) the filter runs one LMS step:
//   y  = sat( sum_n w[n] * x(n) >>> (DW-1) )         filter output
//   e  = sat( d - y )                                  error
//   em = (e * mu) >>> 16                               step-size product
//   w[n] <- sat( w[n] + ((em * x(n)) >>> (DW-1)) )     weight update
// Samples, weights and errors are signed Q1.(DW-1); mu is unsigned Q0.16.
// Shifts truncate towards minus infinity; `sat` saturates to DW bits.
//
// Structure: a tap delay line of N samples, N/L lms_pe processing elements
// whose L multipliers are shared between the filter phase and the update
// phase, a balanced adder tree over the PE partial sums (log2 N levels in
// all), one subtractor for the error and one extra multiplier for the step
// size, i.e. N + 1 multipliers.
//
// Handshake and timing: a sample is accepted when in_valid and in_ready are
// high (in_ready is high only in the idle state). The next cycle computes y
// and e (filter phase); in the cycle after that out_valid is high for one
// cycle with y and e, and the weights are written at its end (update
// phase). One sample is therefore taken every 3 cycles, with a latency of
// 2 cycles from acceptance to out_valid. Weights and delay line reset to 0.
//
// The FIR error computation (error = desired - filter output), the
// log2 N adder stages, the N + 1 multipliers, the shared-multiplier PE and
// the step-size-controlled update follow the publication; N, L, DW, the number
// formats, the saturation and the handshake are design choices.
module adaptive_fir #(
  parameter int unsigned N  = 8,    // filter taps
  parameter int unsigned L  = 4,    // taps per processing element
  parameter int unsigned DW = 16    // data width
) (
  input  logic                        clk,
  input  logic                        rst_n,
  input  logic                        in_valid,
  output logic                        in_ready,
  input  logic signed [DW-1:0]        x_in,
  input  logic signed [DW-1:0]        d_in,
  input  logic        [15:0]          mu,
  output logic                        out_valid,
  output logic signed [DW-1:0]        y,
  output logic signed [DW-1:0]        e,
  output logic signed [N-1:0][DW-1:0] w
);

  localparam int unsigned M   = N / L;
  localparam int unsigned PSW = 2*DW + $clog2(L);
  localparam int unsigned ACW = 2*DW + $clog2(N);
  localparam int unsigned MLV = (M > 1) ? $clog2(M) : 0;

  typedef enum logic [1:0] {F_IDLE, F_FILT, F_UPD} fstate_t;
  fstate_t state;

  logic signed [N-1:0][DW-1:0] xd;       // x(n) .. x(n-N+1)
  logic signed [DW-1:0]        d_q;
  logic signed [DW-1:0]        em;       // mu-scaled error
  logic                        upd;

  logic signed [M-1:0][PSW-1:0]      psum;
  logic signed [M-1:0][L-1:0][2*DW-1:0] dw;

  assign upd = (state == F_UPD);

  for (genvar m = 0; m < M; m++) begin : g_pe
    lms_pe #(.L(L), .DW(DW)) u_pe (
      .update(upd),
      .w(w[m*L +: L]),
      .x(xd[m*L +: L]),
      .e(em),
      .psum(psum[m]),
      .dw(dw[m])
    );
  end

  // adder tree over the PE partial sums, error and step-size product
  logic signed [ACW-1:0] tree [MLV+1][M];
  logic signed [ACW-1:0] acc;
  logic signed [ACW-1:0] y_wide;
  logic signed [DW-1:0]  y_c;
  logic signed [DW:0]    e_wide;
  logic signed [DW-1:0]  e_c;
  logic signed [DW+16:0] em_wide;
  logic signed [DW-1:0]  em_c;

  localparam logic signed [DW-1:0] MAXV = {1'b0, {(DW-1){1'b1}}};
  localparam logic signed [DW-1:0] MINV = {1'b1, {(DW-1){1'b0}}};

  always_comb begin
    for (int m = 0; m < M; m++) tree[0][m] = ACW'($signed(psum[m]));
    for (int v = 1; v <= MLV; v++) begin
      for (int m = 0; m < M; m++) tree[v][m] = '0;
      for (int m = 0; m < (M >> v); m++)
        tree[v][m] = tree[v-1][2*m] + tree[v-1][2*m+1];
    end
    acc    = tree[MLV][0];
    y_wide = acc >>> (DW - 1);
    if (y_wide > ACW'(MAXV))      y_c = MAXV;
    else if (y_wide < ACW'(MINV)) y_c = MINV;
    else                          y_c = y_wide[DW-1:0];
    e_wide = (DW+1)'(d_q) - (DW+1)'(y_c);
    if (e_wide > (DW+1)'(MAXV))      e_c = MAXV;
    else if (e_wide < (DW+1)'(MINV)) e_c = MINV;
    else                             e_c = e_wide[DW-1:0];
    em_wide = ((DW+17)'(e_c) * $signed({1'b0, mu})) >>> 16;
    em_c    = em_wide[DW-1:0];
  end

  // weight update
  logic signed [N-1:0][DW-1:0] w_next;
  always_comb begin
    for (int n = 0; n < N; n++) begin
      logic signed [2*DW-1:0] inc;
      logic signed [DW+1:0]   sum;
      inc = $signed(dw[n / L][n % L]) >>> (DW - 1);
      sum = (DW+2)'($signed(w[n])) + (DW+2)'(inc);
      if (sum > (DW+2)'(MAXV))      w_next[n] = MAXV;
      else if (sum < (DW+2)'(MINV)) w_next[n] = MINV;
      else                          w_next[n] = sum[DW-1:0];
    end
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      state     <= F_IDLE;
      xd        <= '0;
      d_q       <= '0;
      y         <= '0;
      e         <= '0;
      em        <= '0;
      w         <= '0;
      out_valid <= 1'b0;
    end else begin
      out_valid <= 1'b0;
      unique case (state)
        F_IDLE: if (in_valid) begin
          xd    <= {xd[N-2:0], x_in};
          d_q   <= d_in;
          state <= F_FILT;
        end
        F_FILT: begin
          y         <= y_c;
          e         <= e_c;
          em        <= em_c;
          out_valid <= 1'b1;
          state     <= F_UPD;
        end
        F_UPD: begin
          w     <= w_next;
          state <= F_IDLE;
        end
        default: state <= F_IDLE;
      endcase
    end
  end

  assign in_ready = (state == F_IDLE);

  initial assert (N % L == 0 && N >= 2 * L) else $error("N must be a multiple of L, at least 2L");

endmodule
