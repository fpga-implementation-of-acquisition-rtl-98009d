// Testbench for acq_fine_detection. For several satellites, 29 per-bin
// peak results are presented in order with random peaks; one bin carries
// the largest peak. The testbench computes the expected best bin, the
// carrier frequency IF + (bin - 14) * 500 Hz and the 2.5 ratio decision,
// and checks the single det_valid pulse after bin 28. Cases cover a clearly
// visible satellite, a not-visible one, ratios just above and just below
// 2.5, and the best bin at either end of the grid.
module tb_acq_fine_detection;
  import acq_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0, bin_valid = 0;
  logic [4:0] bin_idx = 0;
  logic [5:0] sat_id = 0;
  peak_result_t pk;
  logic det_valid, det_visible;
  logic [5:0] det_sat_id;
  logic [31:0] det_carrier_hz;
  logic [15:0] det_code_phase;
  logic [63:0] det_peak;
  always #5 clk = ~clk;

  acq_fine_detection dut (
    .clk, .rst_n, .bin_valid, .bin_idx, .sat_id, .pk,
    .det_valid, .det_sat_id, .det_visible, .det_carrier_hz, .det_code_phase, .det_peak);

  int pulses = 0;
  always @(posedge clk) if (det_valid) pulses++;

  task automatic run_sat(input int sat, input int best_bin, input longint unsigned best_peak,
                         input longint unsigned best_second, input bit exp_vis);
    int p0;
    p0 = pulses;
    for (int b = 0; b < 29; b++) begin
      @(negedge clk);
      bin_valid = 1; bin_idx = 5'(b); sat_id = 6'(sat);
      if (b == best_bin) begin
        pk.peak = best_peak; pk.second = best_second; pk.code_phase = 16'(1000 + sat);
      end else begin
        pk.peak = 64'($urandom_range(int'(best_peak / 2))); pk.second = 64'($urandom_range(100)); pk.code_phase = 16'($urandom);
      end
      @(negedge clk);
      bin_valid = 0;
      repeat ($urandom_range(3)) @(negedge clk);
      if (b < 28) begin
        checks++;
        if (pulses != p0) begin failures++; $display("early det_valid at bin %0d", b); end
      end
    end
    @(negedge clk);
    checks++;
    if (pulses != p0 + 1) begin failures++; $display("expected one det_valid pulse, saw %0d", pulses - p0); end
    checks++;
    if (det_sat_id != 6'(sat) || det_visible != exp_vis || det_carrier_hz != 32'(9_548_000 + (best_bin - 14) * 500) ||
        det_code_phase != 16'(1000 + sat) || det_peak != best_peak) begin
      failures++;
      $display("sat %0d: got id %0d vis %0b f %0d phase %0d peak %0d; expected vis %0b f %0d phase %0d peak %0d",
               sat, det_sat_id, det_visible, det_carrier_hz, det_code_phase, det_peak,
               exp_vis, 9_548_000 + (best_bin - 14) * 500, 1000 + sat, best_peak);
    end
  endtask

  initial begin
    pk = '0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    run_sat(21, 13, 64'd1_000_000, 64'd100_000, 1'b1);
    run_sat(22, 5, 64'd1_000_000, 64'd900_000, 1'b0);
    run_sat(3, 0, 64'd251, 64'd100, 1'b1);      // ratio 2.51
    run_sat(4, 28, 64'd250, 64'd100, 1'b0);     // ratio exactly 2.5
    run_sat(5, 14, 64'd249, 64'd100, 1'b0);     // ratio 2.49
    run_sat(32, 27, 64'd40_000_000_000, 64'd1, 1'b1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
