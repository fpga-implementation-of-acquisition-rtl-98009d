// acq_cmul_conj: multiplies the signal spectrum by the conjugated PRN spectrum.
//
// Circular correlation in the frequency domain: P[k] = A[k] * conj(B[k]),
// where A is the FFT of the carrier-wiped signal and B the FFT of the
// sampled PRN code. Conjugation and multiplication follow the description;
// the fixed-point handling is this design's: the exact product is shifted
// right by SHIFT bits (arithmetic, truncating) and kept in OW bits. With the
// defaults (A 28 bits, B 18 bits, SHIFT 15) the shifted product always fits
// in 32 bits. Combinational.
module acq_cmul_conj #(
  parameter int unsigned AW    = 28,
  parameter int unsigned BW    = 18,
  parameter int unsigned OW    = 32,
  parameter int unsigned SHIFT = 15
) (
  input  logic signed [AW-1:0] a_re,
  input  logic signed [AW-1:0] a_im,
  input  logic signed [BW-1:0] b_re,
  input  logic signed [BW-1:0] b_im,
  output logic signed [OW-1:0] p_re,
  output logic signed [OW-1:0] p_im
);

  localparam int unsigned PW = AW + BW + 1;
  logic signed [PW-1:0] full_re, full_im;

  always_comb begin
    // (ar + j ai)(br - j bi) = (ar br + ai bi) + j (ai br - ar bi)
    full_re = PW'(a_re) * PW'(b_re) + PW'(a_im) * PW'(b_im);
    full_im = PW'(a_im) * PW'(b_re) - PW'(a_re) * PW'(b_im);
    p_re    = OW'(full_re >>> SHIFT);
    p_im    = OW'(full_im >>> SHIFT);
  end

endmodule
