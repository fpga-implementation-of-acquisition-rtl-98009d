// acq_magnitude: squared magnitude of one correlation sample, |u|^2 = R^2 + I^2.
//
// Applied to every output sample of the inverse FFT; the result is what the
// peak detector searches. The equation is the description's; the width is
// exact (2*W bits, unsigned), computed combinationally.
module acq_magnitude #(
  parameter int unsigned W = 32
) (
  input  logic signed [W-1:0] re,
  input  logic signed [W-1:0] im,
  output logic [2*W-1:0]      mag
);

  logic signed [2*W-1:0] re2, im2;

  always_comb begin
    re2 = (2*W)'(re) * (2*W)'(re);
    im2 = (2*W)'(im) * (2*W)'(im);
    mag = $unsigned(re2) + $unsigned(im2);
  end

endmodule
