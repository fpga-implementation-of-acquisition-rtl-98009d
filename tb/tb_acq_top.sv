// End-to-end testbench for acq_top at a reduced size: N = 1024 samples per
// code period (1.024 MHz sampling), the full 29-bin, 500 Hz grid around a
// 250 kHz IF. The synthetic input holds satellite 7 (code phase 300,
// 251,620 Hz) and satellite 12 (code phase 777, 246,880 Hz) in noise.
// Three searches are run:
//   1. satellites 6..8 with the external PRN stream and random gaps in the
//      sample stream;
//   2. satellites 11..12 with the internal PRN generator, no gaps;
//   3. satellite 7 again with the internal generator.
// Satellite 7 must be reported visible with code phase 300 and carrier
// 251,500 Hz (the nearest bin), satellite 12 visible with code phase 777
// and 247,000 Hz, the others not visible. The time per cell without gaps
// must be 5N plus at most 16 clocks. Each mechanism of the
// design is counted and must occur: input stalls, external and internal
// PRN, bin steps, moves to a new satellite (new PRN), visible and
// not-visible verdicts.
module tb_acq_top;
  localparam int N  = 1024;
  localparam int L  = 10;
  localparam int NB = 29;
  localparam int IFHZ = 250000;

  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic start = 0, prn_external = 1, busy, done;
  logic [5:0] sat_first = 0, sat_last = 0, cur_sat;
  logic [4:0] cur_bin;
  logic sample_valid, sample_ready, prn;
  logic signed [3:0] sig;
  logic signed [7:0] s_c, c_c;
  logic res_valid, res_visible;
  logic [5:0] res_sat_id;
  logic [31:0] res_carrier_hz;
  logic [15:0] res_code_phase;
  logic [63:0] res_peak;
  logic gaps_on = 0;

  tb_gps_source #(
    .N(N), .FS_HZ(1.024e6), .IF_HZ(real'(IFHZ)), .NUM_BINS(NB),
    .SAT_A(7), .PHASE_A(300), .FREQ_A(251620.0), .AMP_A(2.0),
    .SAT_B(12), .PHASE_B(777), .FREQ_B(246880.0), .AMP_B(2.0),
    .NOISE(1.5)
  ) src (
    .clk, .rst_n, .gaps(gaps_on), .cur_sat, .cur_bin, .sample_valid, .sample_ready,
    .sig_out(sig), .sin_out(s_c), .cos_out(c_c), .prn_out(prn));

  acq_top #(.N(N), .IF_HZ(IFHZ)) dut (
    .clk, .rst_n, .start, .sat_first, .sat_last, .prn_external, .busy, .done,
    .cur_sat, .cur_bin, .sample_valid, .sample_ready, .sig_in(sig), .sin_in(s_c), .cos_in(c_c),
    .prn_in(prn), .res_valid, .res_sat_id, .res_visible, .res_carrier_hz, .res_code_phase, .res_peak);

  // mechanism counters
  int n_stall = 0, n_ext = 0, n_int = 0, n_bin_step = 0, n_new_sat = 0, n_vis = 0, n_novis = 0;
  logic [4:0] last_bin = 0;
  logic [5:0] last_sat = 0;
  always @(posedge clk) begin
    if (busy && sample_ready && !sample_valid) n_stall++;
    if (sample_valid && sample_ready && (cur_sat != last_sat || cur_bin != last_bin)) begin
      if (prn_external) n_ext++; else n_int++;
      if (cur_sat == last_sat && cur_bin == last_bin + 1) n_bin_step++;
      if (cur_sat != last_sat) n_new_sat++;
      last_sat <= cur_sat;
      last_bin <= cur_bin;
    end
    if (res_valid && res_visible) n_vis++;
    if (res_valid && !res_visible) n_novis++;
  end

  typedef struct { int sat; bit vis; int phase; int hz; } expect_t;

  task automatic search(input int first, input int last, input bit ext, input bit gaps,
                        input expect_t exp_q [$]);
    int nres, t0, t_prev;
    nres = 0;
    @(negedge clk);
    gaps_on = gaps;
    prn_external = ext; sat_first = 6'(first); sat_last = 6'(last); start = 1;
    @(negedge clk);
    start = 0;
    t0 = int'($time / 10);
    t_prev = t0;
    while (!done) begin
      @(negedge clk);
      if (res_valid) begin
        expect_t e;
        int t_now;
        e = exp_q[nres];
        checks++;
        if (res_sat_id != 6'(e.sat) || res_visible != e.vis ||
            (e.vis && (res_code_phase != 16'(e.phase) || res_carrier_hz != 32'(e.hz)))) begin
          failures++;
          $display("sat %0d: visible %0b phase %0d carrier %0d Hz; expected sat %0d visible %0b phase %0d carrier %0d",
                   res_sat_id, res_visible, res_code_phase, res_carrier_hz, e.sat, e.vis, e.phase, e.hz);
        end else
          $display("sat %0d: visible %0b phase %0d carrier %0d Hz peak %0d", res_sat_id, res_visible,
                   res_code_phase, res_carrier_hz, res_peak);
        t_now = int'($time / 10);
        if (!gaps) begin
          int per_cell;
          per_cell = (t_now - t_prev) / NB;
          $display("  %0d clocks per cell", per_cell);
          checks++;
          if (per_cell < 5 * N || per_cell > 5 * N + 16) begin
            failures++;
            $display("cell time %0d clocks, expected %0d..%0d", per_cell, 5 * N, 5 * N + 16);
          end
        end
        t_prev = t_now;
        nres++;
      end
    end
    checks++;
    if (nres != last - first + 1) begin failures++; $display("%0d results for %0d satellites", nres, last - first + 1); end
  endtask

  initial begin
    expect_t q1 [$], q2 [$], q3 [$];
    q1 = '{'{6, 0, 0, 0}, '{7, 1, 300, 251500}, '{8, 0, 0, 0}};
    q2 = '{'{11, 0, 0, 0}, '{12, 1, 777, 247000}};
    q3 = '{'{7, 1, 300, 251500}};
    repeat (3) @(negedge clk);
    rst_n = 1;
    search(6, 8, 1'b1, 1'b1, q1);
    search(11, 12, 1'b0, 1'b0, q2);
    search(7, 7, 1'b0, 1'b0, q3);
    $display("stalls %0d, external-PRN cells %0d, internal-PRN cells %0d, bin steps %0d, new satellites %0d, visible %0d, not visible %0d",
             n_stall, n_ext, n_int, n_bin_step, n_new_sat, n_vis, n_novis);
    checks++; if (n_stall == 0)    begin failures++; $display("no input stall happened"); end
    checks++; if (n_ext == 0)      begin failures++; $display("external PRN never used"); end
    checks++; if (n_int == 0)      begin failures++; $display("internal PRN never used"); end
    checks++; if (n_bin_step == 0) begin failures++; $display("no bin step"); end
    checks++; if (n_new_sat == 0)  begin failures++; $display("no new satellite"); end
    checks++; if (n_vis == 0)      begin failures++; $display("no visible verdict"); end
    checks++; if (n_novis == 0)    begin failures++; $display("no not-visible verdict"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (4_000_000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
