// tb_gps_source: behavioural model of the host side that feeds the
// acquisition engine (not synthesizable; testbench only).
//
// It plays the role of the recorded front-end data and of the carrier and
// PRN tables that the host prepares. At time zero it builds one code
// period (N samples) of a synthetic IF signal: up to two satellites, each
// a C/A code delayed by a whole number of samples and modulated on a
// cosine at its own frequency, plus Gaussian noise, rounded and clipped to
// a 4-bit signed sample. Then, for whichever cell the engine requests
// (cur_sat, cur_bin), it streams sample k of that signal with
//   sin_out = round(127 sin(2 pi f_bin k / FS)), cos_out likewise,
//   f_bin = IF_HZ + (cur_bin - (NUM_BINS-1)/2) * STEP_HZ,
// and the upsampled C/A code of cur_sat, chip floor(k * 1023 / N).
// k counts accepted samples and wraps at N, so every cell sees the same
// code period starting at carrier phase 0. The C/A codes are built from
// the G2 code delays of the GPS specification. With 'gaps' set,
// sample_valid is high with probability GAP_PCT_NOT/100 per clock, to exercise stalls, and once
// raised stays high until the sample is taken.
module tb_gps_source #(
  parameter int  N           = 1024,
  parameter real FS_HZ       = 1.024e6,
  parameter real IF_HZ       = 250000.0,
  parameter real STEP_HZ     = 500.0,
  parameter int  NUM_BINS    = 29,
  parameter int  SAT_A       = 7,
  parameter int  PHASE_A     = 300,
  parameter real FREQ_A      = 251620.0,
  parameter real AMP_A       = 2.0,
  parameter int  SAT_B       = 0,
  parameter int  PHASE_B     = 0,
  parameter real FREQ_B      = 0.0,
  parameter real AMP_B       = 0.0,
  parameter real NOISE       = 1.5,
  parameter int  GAP_PCT_NOT = 70
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             gaps,
  input  logic [5:0]       cur_sat,
  input  logic [4:0]       cur_bin,
  output logic             sample_valid,
  input  logic             sample_ready,
  output logic signed [3:0] sig_out,
  output logic signed [7:0] sin_out,
  output logic signed [7:0] cos_out,
  output logic             prn_out
);
  localparam real PI = 3.14159265358979323846;
  int delay_tab [32] = '{5, 6, 7, 8, 17, 18, 139, 140, 141, 251, 252, 254, 255, 256, 257, 258,
                         469, 470, 471, 472, 473, 474, 509, 512, 513, 514, 515, 516, 859, 860, 861, 862};
  bit ca [33][1023];
  logic signed [3:0] x [N];
  int k;

  function automatic real uni();
    return (real'($urandom) + 0.5) / 4294967296.0;
  endfunction

  function automatic real gauss();
    return $sqrt(-2.0 * $ln(uni())) * $cos(2.0 * PI * uni());
  endfunction

  function automatic real pm(input int sat, input int j);
    return ca[sat][(j * 1023) / N] ? -1.0 : 1.0;
  endfunction

  function automatic int rnd(input real v);
    return (v >= 0.0) ? $rtoi(v + 0.5) : -$rtoi(0.5 - v);
  endfunction

  initial begin
    bit [10:1] r1, r2;
    bit g1 [1023], g2 [1023];
    r1 = '1; r2 = '1;
    for (int c = 0; c < 1023; c++) begin
      g1[c] = r1[10]; g2[c] = r2[10];
      r1 = {r1[9:1], r1[3] ^ r1[10]};
      r2 = {r2[9:1], r2[2] ^ r2[3] ^ r2[6] ^ r2[8] ^ r2[9] ^ r2[10]};
    end
    for (int s = 1; s <= 32; s++)
      for (int c = 0; c < 1023; c++)
        ca[s][c] = g1[c] ^ g2[(c - delay_tab[s - 1] + 1023) % 1023];
    for (int c = 0; c < 1023; c++) ca[0][c] = 0;
    for (int j = 0; j < N; j++) begin
      real v;
      int q;
      v = NOISE * gauss();
      if (SAT_A != 0) v += AMP_A * pm(SAT_A, (j - PHASE_A + N) % N) * $cos(2.0 * PI * FREQ_A * real'(j) / FS_HZ);
      if (SAT_B != 0) v += AMP_B * pm(SAT_B, (j - PHASE_B + N) % N) * $cos(2.0 * PI * FREQ_B * real'(j) / FS_HZ);
      q = rnd(v);
      if (q > 7) q = 7;
      if (q < -8) q = -8;
      x[j] = 4'(q);
    end
  end

  real fbin, ang;
  always_comb begin
    fbin    = IF_HZ + (real'(int'(cur_bin)) - real'((NUM_BINS - 1) / 2)) * STEP_HZ;
    ang     = 2.0 * PI * fbin * real'(k) / FS_HZ;
    sig_out = x[k];
    sin_out = 8'(rnd(127.0 * $sin(ang)));
    cos_out = 8'(rnd(127.0 * $cos(ang)));
    prn_out = (cur_sat >= 6'd1 && cur_sat <= 6'd32) ? ca[cur_sat][(k * 1023) / N] : 1'b0;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      k            <= 0;
      sample_valid <= 1'b0;
    end else begin
      if (sample_valid && sample_ready) k <= (k + 1) % N;
      if (!sample_valid || sample_ready) sample_valid <= !gaps || ($urandom_range(99) < GAP_PCT_NOT);
    end
  end
endmodule
