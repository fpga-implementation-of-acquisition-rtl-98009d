// acq_top: GPS acquisition engine, parallel code-phase search.
//
// For every satellite in the requested range and every Doppler bin of the
// search grid (29 bins, 500 Hz apart, IF +- 7 kHz by default), the engine
// correlates one code period (N samples, N = 32768 at 32.768 MHz) of the
// incoming IF signal with the satellite's C/A code at all N code phases at
// once, using FFTs:
//
//   correlator      I = s*sin, Q = s*cos                    (acq_mixer)
//                   A = FFT(I + jQ), B = FFT(PRN)           (two acq_fft)
//                   u = IFFT(A * conj(B)), |u|^2 = R^2+I^2  (acq_cmul_conj,
//                                                   acq_fft, acq_magnitude)
//                   |u|^2 stored by code phase              (acq_mag_memory)
//   peak detection  peak, its code phase, second peak       (acq_peak_detector)
//   fine detection  best bin over the grid, peak/second > 2.5 test,
//                   satellite ID and carrier frequency      (acq_fine_detection)
//   search control  next bin / next satellite (new PRN)     (acq_controller)
//
// The three stages and their order, the FFT size, the equation for |u|^2,
// the 2.5 threshold and the 29 x 500 Hz grid follow the description; bit
// widths, the handshake and the scheduling are this design's own.
//
// Sample interface: while busy, the engine asks for the cell (cur_sat,
// cur_bin). The source streams the incoming signal sig_in together with
// the sine and cosine carriers of that bin (sin_in, cos_in) and, if
// prn_external is set, the sampled PRN code of cur_sat (prn_in, 0 = +1,
// 1 = -1). A sample moves when sample_valid and sample_ready are both high.
// Each cell takes exactly N samples, starting from code sample 0 and carrier
// phase 0. With prn_external low the PRN code comes from the internal
// generator instead. Results: one res_valid pulse per satellite.
//
// Timing per cell (clocks, no stalls): N to stream the samples into the
// forward FFTs, N for them to flush their spectra into the inverse FFT
// (the product is formed on the fly, bin by bin, in the order the spectra
// leave), N for the inverse FFT to flush the correlation into the magnitude
// memory, 2N+3 for the peak detector, plus a few clocks of control: about
// 5N + 7 in total, 163,847 clocks at N = 32768.
module acq_top
  import acq_pkg::*;
#(
  parameter int unsigned N        = 32768,
  parameter int unsigned SIG_W    = 4,
  parameter int unsigned CAR_W    = 8,
  parameter int unsigned NUM_BINS = ACQ_NUM_BINS,
  parameter int unsigned IF_HZ    = ACQ_IF_HZ,
  parameter int unsigned STEP_HZ  = ACQ_STEP_HZ,
  parameter int unsigned THR_NUM  = 5,
  parameter int unsigned THR_DEN  = 2
) (
  input  logic                    clk,
  input  logic                    rst_n,
  // search control
  input  logic                    start,
  input  logic [SAT_W-1:0]        sat_first,
  input  logic [SAT_W-1:0]        sat_last,
  input  logic                    prn_external,
  output logic                    busy,
  output logic                    done,
  output logic [SAT_W-1:0]        cur_sat,
  output logic [BIN_W-1:0]        cur_bin,
  // sample stream
  input  logic                    sample_valid,
  output logic                    sample_ready,
  input  logic signed [SIG_W-1:0] sig_in,
  input  logic signed [CAR_W-1:0] sin_in,
  input  logic signed [CAR_W-1:0] cos_in,
  input  logic                    prn_in,
  // per-satellite result
  output logic                    res_valid,
  output logic [SAT_W-1:0]        res_sat_id,
  output logic                    res_visible,
  output logic [31:0]             res_carrier_hz,
  output logic [15:0]             res_code_phase,
  output logic [63:0]             res_peak
);

  localparam int unsigned L     = $clog2(N);
  localparam int unsigned MIX_W = SIG_W + CAR_W;
  localparam int unsigned W1    = MIX_W + L + 1;       // signal FFT, no overflow
  localparam int unsigned W2    = 2 + L + 1;           // PRN FFT, no overflow
  localparam int unsigned W3    = W1 + W2 - L + 1;     // product >> L, inverse FFT
  localparam int unsigned MAG_W = 2 * W3;

  // ---------------- search control ----------------
  logic prn_restart, stream_en, sample_fire, pk_valid;

  acq_controller #(.N(N), .NUM_BINS(NUM_BINS)) u_ctl (
    .clk, .rst_n, .start, .sat_first, .sat_last,
    .sample_fire, .pk_valid,
    .prn_restart, .stream_en, .cur_sat, .cur_bin, .busy, .done
  );

  // ---------------- correlator ----------------
  logic fft_s_in_ready, fft_p_in_ready;
  assign sample_ready = stream_en && fft_s_in_ready && fft_p_in_ready;
  assign sample_fire  = sample_valid && sample_ready;

  logic chip_int, chip;
  acq_prn_gen #(.N(N)) u_prn (
    .clk, .rst_n, .restart(prn_restart), .sat_id(cur_sat),
    .advance(sample_fire), .chip_bit(chip_int)
  );
  assign chip = prn_external ? prn_in : chip_int;

  logic signed [MIX_W-1:0] i_mix, q_mix;
  acq_mixer #(.SIG_W(SIG_W), .CAR_W(CAR_W)) u_mix (
    .sig_in, .sin_in, .cos_in, .i_out(i_mix), .q_out(q_mix)
  );

  logic                 s_out_valid, p_out_valid;
  logic signed [W1-1:0] s_re, s_im;
  logic signed [W2-1:0] p_re, p_im;
  logic [L-1:0]         s_idx, p_idx;

  acq_fft #(.N(N), .IN_W(MIX_W), .W(W1), .INVERSE(1'b0), .SCALE(1'b0)) u_fft_sig (
    .clk, .rst_n,
    .in_valid(sample_fire), .in_ready(fft_s_in_ready), .in_re(i_mix), .in_im(q_mix),
    .out_valid(s_out_valid), .out_re(s_re), .out_im(s_im),
    .out_idx(s_idx)
  );

  acq_fft #(.N(N), .IN_W(2), .W(W2), .INVERSE(1'b0), .SCALE(1'b0)) u_fft_prn (
    .clk, .rst_n,
    .in_valid(sample_fire), .in_ready(fft_p_in_ready),
    .in_re(chip ? -2'sd1 : 2'sd1), .in_im(2'sd0),
    .out_valid(p_out_valid), .out_re(p_re), .out_im(p_im),
    .out_idx(p_idx)
  );

  logic signed [W3-1:0] x_re, x_im;
  acq_cmul_conj #(.AW(W1), .BW(W2), .OW(W3), .SHIFT(L)) u_cmul (
    .a_re(s_re), .a_im(s_im), .b_re(p_re), .b_im(p_im), .p_re(x_re), .p_im(x_im)
  );

  logic                 spec_valid, ifft_in_ready, u_valid;
  logic signed [W3-1:0] u_re, u_im;
  logic [L-1:0]         u_idx;
  assign spec_valid = s_out_valid && p_out_valid;

  acq_fft #(.N(N), .IN_W(W3), .W(W3), .INVERSE(1'b1), .SCALE(1'b1)) u_ifft (
    .clk, .rst_n,
    .in_valid(spec_valid), .in_ready(ifft_in_ready), .in_re(x_re), .in_im(x_im),
    .out_valid(u_valid), .out_re(u_re), .out_im(u_im),
    .out_idx(u_idx)
  );

  logic [MAG_W-1:0] mag, rdata;
  logic [L-1:0]     raddr;
  acq_magnitude #(.W(W3)) u_mag (.re(u_re), .im(u_im), .mag(mag));

  acq_mag_memory #(.N(N), .MAG_W(MAG_W)) u_store (
    .clk, .we(u_valid), .waddr(u_idx), .wdata(mag), .raddr(raddr), .rdata(rdata)
  );

  // ---------------- peak detection ----------------
  logic pd_start, pd_busy;
  peak_result_t pk;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) pd_start <= 1'b0;
    else        pd_start <= u_valid && (u_idx == L'(N - 1));
  end

  acq_peak_detector #(.N(N), .MAG_W(MAG_W)) u_peak (
    .clk, .rst_n, .start(pd_start), .busy(pd_busy),
    .raddr, .rdata, .res_valid(pk_valid), .res(pk)
  );

  // ---------------- fine detection ----------------
  acq_fine_detection #(
    .NUM_BINS(NUM_BINS), .IF_HZ(IF_HZ), .STEP_HZ(STEP_HZ),
    .THR_NUM(THR_NUM), .THR_DEN(THR_DEN)
  ) u_fine (
    .clk, .rst_n, .bin_valid(pk_valid), .bin_idx(cur_bin), .sat_id(cur_sat), .pk,
    .det_valid(res_valid), .det_sat_id(res_sat_id), .det_visible(res_visible),
    .det_carrier_hz(res_carrier_hz), .det_code_phase(res_code_phase), .det_peak(res_peak)
  );

  // The spectra of the two forward FFTs leave in step; the product is only
  // valid when both carry the same bin.
  assert property (@(posedge clk) disable iff (!rst_n)
    spec_valid |-> (s_idx == p_idx));
  // The inverse FFT has no reason to flush while spectra are arriving.
  assert property (@(posedge clk) disable iff (!rst_n)
    spec_valid |-> ifft_in_ready);
  // A new cell must not start before the peak detector is idle.
  assert property (@(posedge clk) disable iff (!rst_n)
    pd_start |-> !pd_busy);

endmodule
