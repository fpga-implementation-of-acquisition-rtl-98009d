// Testbench for acq_fft, 64 points, two instances:
//   forward (unscaled): natural-order input, bit-reversed-order output;
//   inverse (scaled by 1/N, no guard bits, so within 3 LSB of the exact
//   result): bit-reversed-order input, natural-order output.
// Each gets three random frames back to back, the second one with random
// gaps in its input, and is then left idle so that it flushes the last
// frame by itself. Every output is compared with a direct DFT evaluated in
// real arithmetic in the testbench, and out_idx must follow the expected
// order. Timing: with no gaps, the first output of a frame must appear N
// clocks after its first input (it is registered on the step that takes
// the frame's last input), the outputs of frames 1 and 2 must stream
// without a break, and in_ready must drop for exactly the N clocks of the
// flush.
module tb_acq_fft;
  localparam int N    = 64;
  localparam int L    = 6;
  localparam int IN_W = 8;
  localparam int W    = IN_W + L + 1;
  localparam int F    = 3;
  localparam real PI  = 3.14159265358979323846;

  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic f_in_valid = 0, f_in_ready, f_out_valid;
  logic signed [IN_W-1:0] f_in_re = 0, f_in_im = 0;
  logic signed [W-1:0]    f_out_re, f_out_im;
  logic [L-1:0]           f_idx;
  logic i_in_valid = 0, i_in_ready, i_out_valid;
  logic signed [IN_W-1:0] i_in_re = 0, i_in_im = 0;
  logic signed [IN_W-1:0] i_out_re, i_out_im;
  logic [L-1:0]           i_idx;

  acq_fft #(.N(N), .IN_W(IN_W), .W(W), .INVERSE(1'b0), .SCALE(1'b0)) dut_f (
    .clk, .rst_n, .in_valid(f_in_valid), .in_ready(f_in_ready), .in_re(f_in_re), .in_im(f_in_im),
    .out_valid(f_out_valid), .out_re(f_out_re), .out_im(f_out_im), .out_idx(f_idx));

  acq_fft #(.N(N), .IN_W(IN_W), .W(IN_W), .INVERSE(1'b1), .SCALE(1'b1)) dut_i (
    .clk, .rst_n, .in_valid(i_in_valid), .in_ready(i_in_ready), .in_re(i_in_re), .in_im(i_in_im),
    .out_valid(i_out_valid), .out_re(i_out_re), .out_im(i_out_im), .out_idx(i_idx));

  // frame data (time domain for forward, frequency domain for inverse)
  int  xr [F][N], xi [F][N];
  real er [F][N], ei [F][N];

  function automatic int brev(input int a);
    int r = 0;
    for (int b = 0; b < L; b++) if ((a & (1 << b)) != 0) r |= 1 << (L - 1 - b);
    return r;
  endfunction

  function automatic real absr(input real v);
    return v < 0.0 ? -v : v;
  endfunction

  task automatic make_frames(input bit inv, input int amp);
    for (int f = 0; f < F; f++) begin
      for (int n = 0; n < N; n++) begin
        xr[f][n] = int'($urandom_range(2 * amp)) - amp;
        xi[f][n] = int'($urandom_range(2 * amp)) - amp;
      end
      for (int k = 0; k < N; k++) begin
        er[f][k] = 0.0; ei[f][k] = 0.0;
        for (int n = 0; n < N; n++) begin
          real a;
          a = (inv ? 2.0 : -2.0) * PI * real'(k * n % N) / real'(N);
          er[f][k] += real'(xr[f][n]) * $cos(a) - real'(xi[f][n]) * $sin(a);
          ei[f][k] += real'(xr[f][n]) * $sin(a) + real'(xi[f][n]) * $cos(a);
        end
        if (inv) begin er[f][k] /= real'(N); ei[f][k] /= real'(N); end
      end
    end
  endtask

  // Checker: counts outputs, checks order and values, records timing.
  int  n_out, first_out_t, last_out_t, breaks;
  bit  chk_inv;
  real tol;
  int  cyc = 0;
  always @(posedge clk) cyc++;

  always @(negedge clk) begin
    if ((chk_inv ? i_out_valid : f_out_valid) && n_out < F * N) begin
      int f, p, k;
      real gr, gi;
      f  = n_out / N;
      p  = n_out % N;
      k  = chk_inv ? p : brev(p);
      gr = chk_inv ? real'(i_out_re) : real'(f_out_re);
      gi = chk_inv ? real'(i_out_im) : real'(f_out_im);
      checks++;
      if ((chk_inv ? int'(i_idx) : int'(f_idx)) != k || absr(gr - er[f][k]) > tol || absr(gi - ei[f][k]) > tol) begin
        failures++;
        if (failures < 12)
          $display("%s frame %0d out %0d (idx %0d, want %0d): got (%0d,%0d) expected (%f,%f)", chk_inv ? "IFFT" : "FFT",
                   f, p, chk_inv ? i_idx : f_idx, k, $rtoi(gr), $rtoi(gi), er[f][k], ei[f][k]);
      end
      if (n_out == 0) first_out_t = cyc;
      else if (cyc != last_out_t + 1 && f >= 1 && p >= 2) breaks++;
      last_out_t = cyc;
      n_out++;
    end
  end

  task automatic run(input bit inv, input int amp);
    int t_first_in, ready_low;
    chk_inv = inv;
    tol = inv ? 3.0 : (4.0 + 0.002 * real'(amp) * N);
    make_frames(inv, amp);
    n_out = 0; breaks = 0;
    @(negedge clk);
    t_first_in = cyc;
    for (int f = 0; f < F; f++) begin
      for (int p = 0; p < N; p++) begin
        int n;
        n = inv ? brev(p) : p;   // inverse takes bit-reversed order
        if (f == 1) while ($urandom_range(3) == 0) @(negedge clk);
        if (inv) begin i_in_valid = 1; i_in_re = IN_W'(xr[f][n]); i_in_im = IN_W'(xi[f][n]); end
        else     begin f_in_valid = 1; f_in_re = IN_W'(xr[f][n]); f_in_im = IN_W'(xi[f][n]); end
        checks++;
        if ((inv ? i_in_ready : f_in_ready) !== 1'b1) begin failures++; $display("in_ready low in frame %0d", f); end
        @(negedge clk);
        i_in_valid = 0; f_in_valid = 0;
      end
    end
    // idle: the core flushes the last frame by itself
    ready_low = 0;
    repeat (3 * N) begin
      if (!(inv ? i_in_ready : f_in_ready)) ready_low++;
      @(negedge clk);
    end
    checks++;
    if (n_out != F * N) begin failures++; $display("%0d outputs, expected %0d", n_out, F * N); end
    checks++;
    if (first_out_t - t_first_in != N) begin
      failures++; $display("first output after %0d clocks, expected %0d", first_out_t - t_first_in, N);
    end
    checks++;
    if (breaks != 0) begin failures++; $display("%0d breaks in gap-free output", breaks); end
    checks++;
    if (ready_low != N) begin failures++; $display("in_ready low for %0d clocks while flushing, expected %0d", ready_low, N); end
  endtask

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1;
    @(negedge clk);
    run(1'b0, 127);
    run(1'b1, 60);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
