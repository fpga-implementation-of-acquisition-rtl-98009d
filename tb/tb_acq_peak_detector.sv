// Testbench for acq_peak_detector. A behavioural memory with a one-clock
// registered read holds N random magnitudes with a planted peak, a planted
// second peak outside the one-chip exclusion window and larger values
// inside the window (which must be ignored for the second peak). The
// reference peak, index and second peak are found by a direct search in
// the testbench. Cases include a peak near index 0 (window wrapping around
// the end of the code) and a tie (the earlier index wins). The result must
// appear 2*N + 3 clocks after start.
module tb_acq_peak_detector;
  import acq_pkg::*;
  localparam int N    = 256;
  localparam int EXCL = 4;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0, start = 0, busy, res_valid;
  logic [7:0]  raddr;
  logic [63:0] rdata;
  peak_result_t res;
  logic [63:0] mem [N];
  always #5 clk = ~clk;
  always_ff @(posedge clk) rdata <= mem[raddr];

  acq_peak_detector #(.N(N), .MAG_W(64), .EXCL(EXCL)) dut (
    .clk, .rst_n, .start, .busy, .raddr, .rdata, .res_valid, .res);

  task automatic run_case(input int pk_idx, input bit tie);
    longint unsigned ep, es;
    int ei, t;
    for (int a = 0; a < N; a++) mem[a] = 64'($urandom_range(100000));
    mem[pk_idx] = 64'd5_000_000;
    mem[(pk_idx + 2) % N] = 64'd4_000_000;          // inside the window
    mem[(pk_idx - 3 + N) % N] = 64'd3_900_000;      // inside the window
    mem[(pk_idx + N / 2) % N] = 64'd1_000_000;      // true second peak
    if (tie) mem[(pk_idx + 100) % N] = 64'd5_000_000;
    // reference
    ep = 0; ei = 0;
    for (int a = 0; a < N; a++) if (mem[a] > ep) begin ep = mem[a]; ei = a; end
    es = 0;
    for (int a = 0; a < N; a++) begin
      int d;
      d = (a - ei + N) % N;
      if (d > EXCL && d < N - EXCL && mem[a] > es) es = mem[a];
    end
    @(negedge clk);
    start = 1;
    @(negedge clk);
    start = 0;
    t = 1;
    while (!res_valid && t < 10 * N) begin @(negedge clk); t++; end
    checks++;
    if (res.peak != ep || res.code_phase != 16'(ei) || res.second != es) begin
      failures++;
      $display("peak %0d@%0d second %0d, expected %0d@%0d second %0d",
               res.peak, res.code_phase, res.second, ep, ei, es);
    end
    checks++;
    if (t != 2 * N + 3) begin failures++; $display("result after %0d clocks, expected %0d", t, 2 * N + 3); end
    @(negedge clk);
    checks++;
    if (busy) begin failures++; $display("still busy"); end
  endtask

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    run_case(77, 1'b0);
    run_case(1, 1'b0);
    run_case(N - 2, 1'b0);
    run_case(30, 1'b1);
    for (int k = 0; k < 4; k++) run_case(int'($urandom_range(N - 1)), 1'b0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (40 * N) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
