// global_detect: best and worst fitness of the colony.
//
// After a one-cycle `start` pulse the unit scans the S fitness values one per
// clock through a multiplexer addressed by a counter (i = i + 1). Each value
// is compared with a running minimum (<=) and a running maximum (>=)
// register; the first value initialises both. `done` pulses for one cycle
// S cycles after start, when f_min, f_max and idx_min (the index of the bee
// holding f_min; on ties the later index) are valid. They stay valid until
// the next start. `busy` is high during the scan. The values must be held
// stable during the scan.
//
// The sequential scan with <= and >= comparators and the f_min output follow
// the "Global Detection" stage of the parallel architecture; tie handling and
// the handshake are design choices.
module global_detect #(
  parameter int unsigned S  = 4,    // number of bees
  parameter int unsigned FW = 32    // fitness width
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 start,
  input  logic [S-1:0][FW-1:0] f_in,
  output logic                 busy,
  output logic                 done,
  output logic [FW-1:0]        f_min,
  output logic [FW-1:0]        f_max,
  output logic [$clog2(S)-1:0] idx_min
);

  localparam int unsigned IW = $clog2(S);

  logic [IW-1:0] i;
  logic [FW-1:0] f_sel;

  assign f_sel = f_in[i];

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      busy    <= 1'b0;
      done    <= 1'b0;
      i       <= '0;
      f_min   <= '0;
      f_max   <= '0;
      idx_min <= '0;
    end else begin
      done <= 1'b0;
      if (start) begin
        busy <= 1'b1;
        i    <= '0;
      end else if (busy) begin
        if (i == '0 || f_sel <= f_min) begin
          f_min   <= f_sel;
          idx_min <= i;
        end
        if (i == '0 || f_sel >= f_max)
          f_max <= f_sel;
        if (i == IW'(S - 1)) begin
          busy <= 1'b0;
          done <= 1'b1;
        end else begin
          i <= i + 1'b1;
        end
      end
    end
  end

endmodule
