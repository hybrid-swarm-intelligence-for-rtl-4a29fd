// bee_individual: register-bank entry of one bee (food source).
//
// Holds the bee's position x (D coordinates of XW bits), its fitness f and
// its trial counter tr. Two kinds of write:
//   load   : unconditional write of a candidate and its fitness, trial
//            counter cleared (random initialisation and opposition step);
//   try_en : greedy selection. The candidate fitness is compared with the
//            stored one (cand_f <= f). If it is not worse the candidate
//            replaces the position and the counter is cleared; otherwise
//            the position is kept and tr = tr + 1 (saturating).
// `accepted` / `rejected` are combinational and valid in the cycle of try_en;
// the registers change on the following clock edge. `load` wins over try_en.
//
// The <= comparator, the stored fitness and the tr = tr + 1 counter follow
// the "Individual" and "Update new x" stages of the parallel architecture;
// the counter width, saturation and reset values are design choices.
module bee_individual #(
  parameter int unsigned D   = 4,    // dimensions
  parameter int unsigned XW  = 8,    // coordinate width
  parameter int unsigned FW  = 32,   // fitness width
  parameter int unsigned TRW = 8     // trial counter width
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 load,
  input  logic                 try_en,
  input  logic [D-1:0][XW-1:0] cand_x,
  input  logic [FW-1:0]        cand_f,
  output logic [D-1:0][XW-1:0] x,
  output logic [FW-1:0]        f,
  output logic [TRW-1:0]       tr,
  output logic                 accepted,
  output logic                 rejected
);

  logic better;

  always_comb begin
    better   = (cand_f <= f);
    accepted = try_en && !load && better;
    rejected = try_en && !load && !better;
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      x  <= '0;
      f  <= '1;
      tr <= '0;
    end else if (load || accepted) begin
      x  <= cand_x;
      f  <= cand_f;
      tr <= '0;
    end else if (rejected && (tr != '1)) begin
      tr <= tr + 1'b1;
    end
  end

endmodule
