// Full-size testbench for acq_top: every parameter at its default
// (N = 32768 samples per code period at 32.768 MHz, 29 bins of 500 Hz
// around a 9.548 MHz IF). The synthetic input holds satellite 21 at code
// phase 13404 with carrier 9,547,420 Hz and satellite 22 at code phase
// 6288 with carrier 9,549,695 Hz, in noise. One complete search of
// satellites 21..22 with the internal PRN generator and satellite 23 (absent)
// must report 21 visible at 13404 / 9,547,500 Hz, 22 visible at
// 6288 / 9,549,500 Hz (the nearest 500 Hz bins) and 23 not visible; each
// cell must take 5N clocks plus at most 16.
module tb_acq_top_full;
  localparam int N  = 32768;
  localparam int L  = 15;
  localparam int NB = 29;

  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic start = 0, prn_external = 0, busy, done;
  logic [5:0] sat_first = 21, sat_last = 23, cur_sat;
  logic [4:0] cur_bin;
  logic sample_valid, sample_ready, prn;
  logic signed [3:0] sig;
  logic signed [7:0] s_c, c_c;
  logic res_valid, res_visible;
  logic [5:0] res_sat_id;
  logic [31:0] res_carrier_hz;
  logic [15:0] res_code_phase;
  logic [63:0] res_peak;

  tb_gps_source #(
    .N(N), .FS_HZ(32.768e6), .IF_HZ(9.548e6), .NUM_BINS(NB),
    .SAT_A(21), .PHASE_A(13404), .FREQ_A(9547420.0), .AMP_A(1.5),
    .SAT_B(22), .PHASE_B(6288), .FREQ_B(9549695.0), .AMP_B(1.5),
    .NOISE(2.0)
  ) src (
    .clk, .rst_n, .gaps(1'b0), .cur_sat, .cur_bin, .sample_valid, .sample_ready,
    .sig_out(sig), .sin_out(s_c), .cos_out(c_c), .prn_out(prn));

  acq_top dut (
    .clk, .rst_n, .start, .sat_first, .sat_last, .prn_external, .busy, .done,
    .cur_sat, .cur_bin, .sample_valid, .sample_ready, .sig_in(sig), .sin_in(s_c), .cos_in(c_c),
    .prn_in(prn), .res_valid, .res_sat_id, .res_visible, .res_carrier_hz, .res_code_phase, .res_peak);

  int exp_sat [3]   = '{21, 22, 23};
  bit exp_vis [3]   = '{1'b1, 1'b1, 1'b0};
  int exp_phase [3] = '{13404, 6288, 0};
  int exp_hz [3]    = '{9547500, 9549500, 0};

  initial begin
    int nres, t_prev, t_now, per_cell;
    nres = 0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    @(negedge clk);
    start = 1;
    @(negedge clk);
    start = 0;
    t_prev = int'($time / 10);
    while (!done) begin
      @(negedge clk);
      if (res_valid) begin
        $display("sat %0d: visible %0b phase %0d carrier %0d Hz peak %0d", res_sat_id, res_visible,
                 res_code_phase, res_carrier_hz, res_peak);
        checks++;
        if (nres > 2 || res_sat_id != 6'(exp_sat[nres]) || res_visible != exp_vis[nres] ||
            (exp_vis[nres] && (res_code_phase != 16'(exp_phase[nres]) || res_carrier_hz != 32'(exp_hz[nres])))) begin
          failures++;
          $display("unexpected result %0d", nres);
        end
        t_now = int'($time / 10);
        per_cell = (t_now - t_prev) / NB;
        checks++;
        if (per_cell < 5 * N || per_cell > 5 * N + 16) begin
          failures++;
          $display("cell time %0d clocks, expected %0d..%0d", per_cell, 5 * N, 5 * N + 16);
        end
        t_prev = t_now;
        nres++;
      end
    end
    checks++;
    if (nres != 3) begin failures++; $display("%0d results, expected 3", nres); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3 * NB * N * (L + 6)) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
