// Testbench for acq_top in its second configuration: 8.192 MHz sampling,
// N = 8192 points per code period, 2.046 MHz IF, 29 bins of 500 Hz. The
// synthetic input holds satellite 9 at code phase 1174 with carrier
// 2,048,843 Hz (IF + 2843 Hz) in noise. A search of satellites 8..9 with
// the internal PRN generator must report 8 not visible and 9 visible at
// code phase 1174 and 2,049,000 Hz (the nearest bin), each cell taking
// 5N clocks plus at most 16.
module tb_acq_top_8k;
  localparam int N    = 8192;
  localparam int L    = 13;
  localparam int NB   = 29;
  localparam int IFHZ = 2_046_000;

  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic start = 0, prn_external = 0, busy, done;
  logic [5:0] sat_first = 8, sat_last = 9, cur_sat;
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
    .N(N), .FS_HZ(8.192e6), .IF_HZ(real'(IFHZ)), .NUM_BINS(NB),
    .SAT_A(9), .PHASE_A(1174), .FREQ_A(2048843.0), .AMP_A(1.5),
    .NOISE(2.0)
  ) src (
    .clk, .rst_n, .gaps(1'b0), .cur_sat, .cur_bin, .sample_valid, .sample_ready,
    .sig_out(sig), .sin_out(s_c), .cos_out(c_c), .prn_out(prn));

  acq_top #(.N(N), .IF_HZ(IFHZ)) dut (
    .clk, .rst_n, .start, .sat_first, .sat_last, .prn_external, .busy, .done,
    .cur_sat, .cur_bin, .sample_valid, .sample_ready, .sig_in(sig), .sin_in(s_c), .cos_in(c_c),
    .prn_in(prn), .res_valid, .res_sat_id, .res_visible, .res_carrier_hz, .res_code_phase, .res_peak);

  int exp_sat [2]   = '{8, 9};
  bit exp_vis [2]   = '{1'b0, 1'b1};

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
        if (nres > 1 || res_sat_id != 6'(exp_sat[nres]) || res_visible != exp_vis[nres] ||
            (exp_vis[nres] && (res_code_phase != 16'd1174 || res_carrier_hz != 32'd2049000))) begin
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
    if (nres != 2) begin failures++; $display("%0d results, expected 2", nres); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2 * NB * N * (L + 6)) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
