// radix2_bu: radix-2 decimation-in-frequency butterfly.
//
// Takes the two samples of a lane pair whose frame indices differ in one bit
// and returns their sum (on the output whose index bit is 0) and difference
// (index bit 1). It has no twiddle of its own: every rotation of the design
// follows the butterflies as a separate rotator. The output is one bit wider
// than the input, so the sum never overflows and no scaling is applied.
// Purely combinational; fft_stage registers its outputs.
module radix2_bu #(
  parameter int W = 16                       // input word width (real and imaginary)
) (
  input  logic signed [W-1:0] a_re, a_im,    // sample with index bit 0
  input  logic signed [W-1:0] b_re, b_im,    // sample with index bit 1
  output logic signed [W:0]   s_re, s_im,    // a + b
  output logic signed [W:0]   d_re, d_im     // a - b
);
  always_comb begin
    s_re = (W+1)'(a_re) + (W+1)'(b_re);
    s_im = (W+1)'(a_im) + (W+1)'(b_im);
    d_re = (W+1)'(a_re) - (W+1)'(b_re);
    d_im = (W+1)'(a_im) - (W+1)'(b_im);
  end
endmodule
