// Testbench for acq_controller with a 16-sample cell and 3 bins. A model of
// the datapath accepts samples with random gaps while stream_en is high and
// answers pk_valid some clocks after the N-th sample. The testbench checks
// that the cells are visited in the order (sat, bin) = (sat_first, 0) ..
// (sat_last, 2), that each cell takes exactly N samples and is preceded by
// one prn_restart, that no samples are taken while waiting, and that done
// pulses once at the end. A second search with a single satellite follows.
module tb_acq_controller;
  localparam int N = 16, NB = 3;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0, start = 0, sample_fire = 0, pk_valid = 0;
  logic [5:0] sat_first, sat_last, cur_sat;
  logic [4:0] cur_bin;
  logic prn_restart, stream_en, busy, done;
  always #5 clk = ~clk;

  acq_controller #(.N(N), .NUM_BINS(NB)) dut (
    .clk, .rst_n, .start, .sat_first, .sat_last, .sample_fire, .pk_valid,
    .prn_restart, .stream_en, .cur_sat, .cur_bin, .busy, .done);

  int restarts = 0, samples = 0, dones = 0;
  always @(posedge clk) begin
    if (prn_restart) restarts++;
    if (sample_fire) samples++;
    if (done) dones++;
  end

  task automatic search(input int first, input int last);
    int d0;
    d0 = dones;
    @(negedge clk);
    sat_first = 6'(first); sat_last = 6'(last); start = 1;
    @(negedge clk);
    start = 0;
    for (int s = first; s <= last; s++) begin
      for (int b = 0; b < NB; b++) begin
        int r0, got;
        r0 = restarts;
        while (!stream_en) @(negedge clk);
        checks++;
        if (cur_sat != 6'(s) || cur_bin != 5'(b) || restarts != r0 + 1) begin
          failures++;
          $display("cell (%0d,%0d) restarts %0d, expected (%0d,%0d) one restart", cur_sat, cur_bin, restarts - r0, s, b);
        end
        got = 0;
        while (stream_en) begin
          sample_fire = ($urandom_range(2) != 0);
          if (sample_fire) got++;
          @(negedge clk);
          sample_fire = 0;
        end
        checks++;
        if (got != N) begin failures++; $display("cell took %0d samples", got); end
        repeat ($urandom_range(5, 1)) begin
          @(negedge clk);
          checks++;
          if (stream_en || prn_restart) begin failures++; $display("stream reopened before the result"); end
        end
        pk_valid = 1;
        @(negedge clk);
        pk_valid = 0;
      end
    end
    repeat (4) @(negedge clk);
    checks++;
    if (dones != d0 + 1 || busy) begin failures++; $display("done pulses %0d busy %0b", dones - d0, busy); end
  endtask

  initial begin
    sat_first = 0; sat_last = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    search(3, 6);
    search(21, 21);
    checks++;
    if (samples != 5 * NB * N) begin failures++; $display("total samples %0d", samples); end
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
