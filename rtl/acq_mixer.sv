// acq_mixer: carrier wipe-off at the front of the correlator.
//
// The incoming IF samples are multiplied by a locally supplied sine and
// cosine carrier for the frequency bin under test. Following the block
// diagram of the correlator, the product with the sine carrier is the
// in-phase component I, which feeds the real input of the signal FFT, and
// the product with the cosine carrier is the quadrature component Q, which
// feeds its imaginary input. The multiplication is exact (full-width
// products) and purely combinational; valid/ready are handled around it.
// Input widths: a 4-bit signed sample (the captured data spans -8..7) and
// an 8-bit signed carrier; both widths are parameters of this design.
module acq_mixer #(
  parameter int unsigned SIG_W = 4,
  parameter int unsigned CAR_W = 8
) (
  input  logic signed [SIG_W-1:0]       sig_in,
  input  logic signed [CAR_W-1:0]       sin_in,
  input  logic signed [CAR_W-1:0]       cos_in,
  output logic signed [SIG_W+CAR_W-1:0] i_out,
  output logic signed [SIG_W+CAR_W-1:0] q_out
);

  always_comb begin
    i_out = (SIG_W+CAR_W)'(sig_in) * (SIG_W+CAR_W)'(sin_in);
    q_out = (SIG_W+CAR_W)'(sig_in) * (SIG_W+CAR_W)'(cos_in);
  end

endmodule
