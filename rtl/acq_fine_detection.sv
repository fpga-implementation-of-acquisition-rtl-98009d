// acq_fine_detection: decides whether a satellite is visible and reports its
// carrier frequency.
//
// It receives one peak-detector result per frequency bin of the satellite
// under test (bins 0..NUM_BINS-1, in order) and keeps the result with the
// largest peak. After the last bin it compares that peak with the second
// peak of the same bin: the satellite is visible when
// peak / second > THR_NUM / THR_DEN, 2.5 by default, evaluated without
// division as peak * THR_DEN > second * THR_NUM. It then reports, for one
// clock on det_valid, the satellite ID, the visibility decision, the code
// phase and peak of the best bin and the carrier frequency of that bin,
//   carrier_hz = IF_HZ + (bin - (NUM_BINS-1)/2) * STEP_HZ,
// with the default 29 bins at 500 Hz spanning IF +- 7 kHz.
// The threshold test and the outputs (carrier frequency and satellite ID)
// follow the description. The carrier frequency is the centre of the
// winning 500 Hz bin: the description does not say how a finer frequency
// is obtained from the code phase and peak it receives, so no refinement
// below the bin spacing is made here.
module acq_fine_detection
  import acq_pkg::*;
#(
  parameter int unsigned NUM_BINS = ACQ_NUM_BINS,
  parameter int unsigned IF_HZ    = ACQ_IF_HZ,
  parameter int unsigned STEP_HZ  = ACQ_STEP_HZ,
  parameter int unsigned THR_NUM  = 5,
  parameter int unsigned THR_DEN  = 2
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             bin_valid,
  input  logic [BIN_W-1:0] bin_idx,
  input  logic [SAT_W-1:0] sat_id,
  input  peak_result_t     pk,
  output logic             det_valid,
  output logic [SAT_W-1:0] det_sat_id,
  output logic             det_visible,
  output logic [31:0]      det_carrier_hz,
  output logic [15:0]      det_code_phase,
  output logic [63:0]      det_peak
);

  peak_result_t     best, best_nx;
  logic [BIN_W-1:0] best_bin, best_bin_nx;
  logic [71:0]      lhs, rhs;

  // Best result including the one arriving now; bin 0 starts a new satellite.
  always_comb begin
    best_nx     = best;
    best_bin_nx = best_bin;
    if (bin_idx == '0 || pk.peak > best.peak) begin
      best_nx     = pk;
      best_bin_nx = bin_idx;
    end
    lhs = 72'(best_nx.peak) * 72'(THR_DEN);
    rhs = 72'(best_nx.second) * 72'(THR_NUM);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      best           <= '0;
      best_bin       <= '0;
      det_valid      <= 1'b0;
      det_sat_id     <= '0;
      det_visible    <= 1'b0;
      det_carrier_hz <= '0;
      det_code_phase <= '0;
      det_peak       <= '0;
    end else begin
      det_valid <= 1'b0;
      if (bin_valid) begin
        best     <= best_nx;
        best_bin <= best_bin_nx;
        if (bin_idx == BIN_W'(NUM_BINS - 1)) begin
          det_valid      <= 1'b1;
          det_sat_id     <= sat_id;
          det_visible    <= (lhs > rhs);
          det_carrier_hz <= 32'(IF_HZ + 32'(best_bin_nx) * STEP_HZ - ((NUM_BINS - 1) / 2) * STEP_HZ);
          det_code_phase <= best_nx.code_phase;
          det_peak       <= best_nx.peak;
        end
      end
    end
  end

endmodule
