// lms_pe: processing element of the adaptive filter.
//
// L signed multipliers are shared between the two halves of an LMS step.
// In front of each multiplier a MUX selects the weight w(mL+l) or the
// scaled error e; the other operand is always the tap sample x(n-mL-l).
// Behind each multiplier a DMUX routes the product either to the adder unit
// or to the weight-increment output:
//   update = 0 (filter phase) : psum = sum_l w(mL+l) * x(n-mL-l), dw = 0
//   update = 1 (update phase) : dw[l] = e * x(n-mL-l),           psum = 0
// The adder unit is a balanced tree of log2(L) levels. Products are full
// precision (2*DW bits); psum has log2(L) guard bits. Combinational.
// Elements of the packed port arrays are read through $signed().
//
// The MUX / multiplier / DMUX / adder-unit structure follows the published
// processing element; the number formats are design choices.
module lms_pe #(
  parameter int unsigned L  = 4,    // taps per processing element
  parameter int unsigned DW = 16    // sample / weight / error width
) (
  input  logic                        update,
  input  logic signed [L-1:0][DW-1:0] w,
  input  logic signed [L-1:0][DW-1:0] x,
  input  logic signed [DW-1:0]        e,
  output logic signed [2*DW+$clog2(L)-1:0] psum,
  output logic signed [L-1:0][2*DW-1:0]    dw
);

  localparam int unsigned PW = 2*DW + $clog2(L);
  localparam int unsigned LV = $clog2(L);

  logic signed [DW-1:0]   mux_out [L];
  logic signed [2*DW-1:0] prod    [L];
  logic signed [PW-1:0]   tree    [LV+1][L];

  always_comb begin
    for (int l = 0; l < L; l++) begin
      mux_out[l] = update ? e : $signed(w[l]);
      prod[l]    = mux_out[l] * $signed(x[l]);
      dw[l]      = update ? prod[l] : '0;
      tree[0][l] = update ? '0 : PW'(prod[l]);  // sign-extends
    end
    // adder unit: level v adds pairs of level v-1
    for (int v = 1; v <= LV; v++) begin
      for (int l = 0; l < L; l++) tree[v][l] = '0;
      for (int l = 0; l < (L >> v); l++)
        tree[v][l] = tree[v-1][2*l] + tree[v-1][2*l+1];
    end
    psum = tree[LV][0];
  end

  initial assert (L >= 2 && (L & (L - 1)) == 0) else $error("L must be a power of two");

endmodule
