// acq_fft: N-point complex FFT / inverse FFT with pipelined streaming I/O.
//
// The acquisition engine uses three of these: one transforms the carrier-wiped
// incoming signal (I on the real input, Q on the imaginary input), one
// transforms the sampled PRN code, and one, with INVERSE set, brings the
// product of the two spectra back to the time domain. The description fixes
// the transform size (32768 points at 32.768 MHz sampling, 8192 at
// 8.192 MHz), the two-input / two-output complex interface and the
// pipelined streaming configuration; the internal architecture is this
// design's own choice: a radix-2 single-path delay-feedback (SDF) pipeline.
//
// Structure: log2(N) stages in a row, each a butterfly with a feedback delay
// line of D words, the delay lines together holding N-1 samples. The
// forward transform is decimation in frequency (D = N/2, N/4, ..., 1; natural
// order in, bit-reversed order out) with the twiddle factor applied to each
// difference as it leaves its delay line. The inverse transform is
// decimation in time (D = 1, 2, ..., N/2; bit-reversed order in, natural order
// out) with the twiddle applied to the second operand before the butterfly.
// The two therefore chain without any reordering memory: spectra leave the
// forward transforms in bit-reversed order, are multiplied in that order and
// enter the inverse transform in the order it expects.
//
// Twiddles: a ROM of N/2 cosine and sine values in Q(TW_W-1),
// round((2^(TW_W-1)-1) * cos(2*pi*k/N)) to within one unit, computed with
// integer arithmetic when the ROM is built;
// forward uses exp(-j*2*pi*k/N), inverse exp(+j*2*pi*k/N). With SCALE = 0
// nothing is scaled and W >= IN_W + log2(N) + 1 prevents overflow; with
// SCALE = 1 every butterfly halves its results (rounding half up), so the
// output is the transform divided by N.
//
// Streaming and timing: the pipeline moves one step on every accepted input
// sample (in_valid && in_ready); a gap in the input stalls it. Frames are N
// consecutive samples. The first result of a frame is registered on the
// step that takes the frame's last sample (N clocks after its first sample
// without gaps); the rest follow one per step after that, so back-to-back
// frames stream continuously. When a frame has ended and no new input
// arrives, the core pushes one frame of zeros through on its own (in_ready
// is low during those N clocks) to deliver the pending result. out_valid
// marks the samples of real frames; out_idx is the bin (forward) or sample
// (inverse) index each output holds. There is no output back-pressure.
module acq_fft #(
  parameter int unsigned N       = 32768,
  parameter int unsigned IN_W    = 12,
  parameter int unsigned W       = 28,
  parameter int unsigned TW_W    = 16,
  parameter bit          INVERSE = 1'b0,
  parameter bit          SCALE   = 1'b0
) (
  input  logic                   clk,
  input  logic                   rst_n,
  // input stream
  input  logic                   in_valid,
  output logic                   in_ready,
  input  logic signed [IN_W-1:0] in_re,
  input  logic signed [IN_W-1:0] in_im,
  // output stream
  output logic                   out_valid,
  output logic signed [W-1:0]    out_re,
  output logic signed [W-1:0]    out_im,
  output logic [$clog2(N)-1:0]   out_idx
);

  localparam int unsigned L  = $clog2(N);
  localparam int unsigned PW = W + TW_W + 1;

  // ---------------- twiddle ROM ----------------
  logic signed [TW_W-1:0] tw_cos [N/2];
  logic signed [TW_W-1:0] tw_sin [N/2];

  // cos and sin of 2*pi*m/N for m in [0, N/8] (angles up to pi/4) in
  // Q(TW_W-1), integer arithmetic only: both series are summed in Q30 and
  // rounded to the ROM format. The rest of the half turn follows by symmetry.
  localparam longint PI_Q30 = 64'd3373259426;   // round(pi * 2^30)

  function automatic logic signed [2*TW_W-1:0] cos_sin(input longint m);
    longint x, x2, tc, ts, c, sn, amp;
    x   = (m * 2 * PI_Q30) / longint'(N);
    x2  = (x * x) >>> 30;
    tc  = 64'sd1 <<< 30;  c  = tc;
    ts  = x;              sn = ts;
    for (int n = 1; n <= 6; n++) begin
      tc = -((tc * x2) >>> 30) / longint'((2 * n - 1) * (2 * n));
      ts = -((ts * x2) >>> 30) / longint'((2 * n) * (2 * n + 1));
      c  += tc;
      sn += ts;
    end
    amp = (64'sd1 <<< (TW_W - 1)) - 1;
    return {TW_W'((c * amp + (64'sd1 <<< 29)) >>> 30),
            TW_W'((sn * amp + (64'sd1 <<< 29)) >>> 30)};
  endfunction

  initial begin
    for (int m = 0; m <= int'(N / 8); m++) begin
      logic signed [TW_W-1:0] c, sn;
      {c, sn} = cos_sin(longint'(m));
      tw_cos[m] = c;                         tw_sin[m] = sn;
      tw_cos[N/4 - m] = sn;                  tw_sin[N/4 - m] = c;
      if (m > 0) begin
        tw_cos[N/4 + m] = -sn;               tw_sin[N/4 + m] = c;
        tw_cos[N/2 - m] = -c;                tw_sin[N/2 - m] = sn;
      end
    end
  end

  // (xr + j xi) * (wc + j ws), rounded back to Q0, W + 2 bits.
  function automatic logic signed [2*(W+2)-1:0] twiddle_mul(
      input logic signed [W+1:0] xr, input logic signed [W+1:0] xi,
      input logic signed [TW_W-1:0] wc, input logic signed [TW_W-1:0] ws);
    logic signed [PW+1:0] pr, pi;
    logic signed [W+1:0]  rr, ri;
    pr = (PW+2)'(xr) * (PW+2)'(wc) - (PW+2)'(xi) * (PW+2)'(ws) + ((PW+2)'(1) <<< (TW_W - 2));
    pi = (PW+2)'(xr) * (PW+2)'(ws) + (PW+2)'(xi) * (PW+2)'(wc) + ((PW+2)'(1) <<< (TW_W - 2));
    rr = (W+2)'(pr >>> (TW_W - 1));
    ri = (W+2)'(pi >>> (TW_W - 1));
    return {rr, ri};
  endfunction

  // Optional halving with rounding, then back to W bits.
  function automatic logic signed [W-1:0] fit(input logic signed [W+1:0] v);
    if (SCALE) return W'((v + (W+2)'(1)) >>> 1);
    else       return W'(v);
  endfunction

  function automatic logic [L-1:0] bitrev(input logic [L-1:0] a);
    for (int i = 0; i < int'(L); i++) bitrev[i] = a[L-1-i];
  endfunction

  // ---------------- frame control ----------------
  logic         zero_mode;   // pushing a frame of zeros to flush
  logic         adv;         // the pipeline steps this clock
  logic [L-1:0] cnt;         // position of the current input in its frame
  logic         real_prev;   // previous input frame carried data
  logic         out_real;

  assign in_ready = !zero_mode;
  assign adv      = zero_mode || in_valid;
  // A step at position N-1 delivers output 0 of the current frame; every
  // other step delivers output cnt+1 of the previous frame.
  assign out_real = (cnt == L'(N - 1)) ? !zero_mode : real_prev;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      zero_mode <= 1'b0;
      cnt       <= '0;
      real_prev <= 1'b0;
    end else if (adv) begin
      cnt <= cnt + 1'b1;
      if (cnt == L'(N - 1)) begin
        real_prev <= !zero_mode;
        zero_mode <= 1'b0;
      end
    end else if (cnt == '0 && real_prev) begin
      // frame boundary, no new input, a result still inside: flush
      zero_mode <= 1'b1;
    end
  end

  // ---------------- butterfly stages ----------------
  logic signed [W-1:0] src_r, src_i;
  assign src_r = zero_mode ? '0 : W'(in_re);
  assign src_i = zero_mode ? '0 : W'(in_im);

  for (genvar s = 0; s < int'(L); s++) begin : g_stage
    // delay D and twiddle stride of this stage
    localparam int unsigned LD = INVERSE ? s : L - 1 - s;      // log2(D)
    localparam int unsigned D  = 1 << LD;
    localparam int unsigned TS = INVERSE ? L - 1 - s : s;      // log2(stride)
    // stage input is delayed by the stages before it; position within 2D
    localparam int unsigned OFF = INVERSE ? D - 1 : 0;

    logic signed [W-1:0]    fr [D];
    logic signed [W-1:0]    fi [D];
    logic [LD:0]            c;
    logic [LD > 0 ? LD-1 : 0:0] j;
    logic                   first;
    logic [L-2:0]           tix;
    logic signed [TW_W-1:0] wc, ws;
    logic signed [W+1:0]    ar, ai, br, bi, tr, ti;
    logic signed [W-1:0]    fin_r, fin_i;
    logic signed [W-1:0]    xr, xi, yr, yi;   // stage input and output

    if (s == 0) begin : g_in0
      assign xr = src_r;
      assign xi = src_i;
    end else begin : g_inN
      assign xr = g_stage[s-1].yr;
      assign xi = g_stage[s-1].yi;
    end

    assign c     = (LD+1)'(cnt - L'(OFF));
    assign first = !c[LD];
    assign j     = (LD > 0) ? c[LD > 0 ? LD-1 : 0:0] : '0;
    assign tix   = (L-1)'(32'(j) << TS);
    assign wc    = tw_cos[tix];
    assign ws    = INVERSE ? tw_sin[tix] : -tw_sin[tix];

    always_comb begin
      logic signed [2*(W+2)-1:0] prod;
      ar = (W+2)'(fr[j]);
      ai = (W+2)'(fi[j]);
      br = (W+2)'(xr);
      bi = (W+2)'(xi);
      if (INVERSE) begin
        // decimation in time: twiddle on the second operand, then butterfly
        prod = twiddle_mul(br, bi, wc, ws);
        tr   = prod[2*(W+2)-1:W+2];
        ti   = prod[W+1:0];
        if (first) begin
          fin_r = xr;                 fin_i = xi;
          yr = fr[j];            yi = fi[j];
        end else begin
          fin_r = fit(ar - tr);       fin_i = fit(ai - ti);
          yr = fit(ar + tr);     yi = fit(ai + ti);
        end
      end else begin
        // decimation in frequency: butterfly, twiddle on the difference
        prod = twiddle_mul(ar, ai, wc, ws);
        tr   = prod[2*(W+2)-1:W+2];
        ti   = prod[W+1:0];
        if (first) begin
          fin_r = xr;                 fin_i = xi;
          yr = W'(tr);           yi = W'(ti);
        end else begin
          fin_r = fit(ar - br);       fin_i = fit(ai - bi);
          yr = fit(ar + br);     yi = fit(ai + bi);
        end
      end
    end

    always_ff @(posedge clk) begin
      if (adv) begin
        fr[j] <= fin_r;
        fi[j] <= fin_i;
      end
    end
  end

  // ---------------- registered output ----------------
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
      out_re    <= '0;
      out_im    <= '0;
      out_idx   <= '0;
    end else begin
      out_valid <= adv && out_real;
      out_re    <= g_stage[L-1].yr;
      out_im    <= g_stage[L-1].yi;
      out_idx   <= INVERSE ? L'(cnt + 1'b1) : bitrev(L'(cnt + 1'b1));
    end
  end

endmodule
