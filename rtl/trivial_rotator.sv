// trivial_rotator: multiplies a complex sample by -j when rot is high and by 1
// otherwise.
//
// A rotation by -j needs no multiplier: the real and imaginary parts are
// swapped and the new imaginary part is negated, (re, im) -> (im, -re).
// Inputs are assumed to stay inside the circle of radius 2^(W-1), so the
// negation of the most negative code does not occur in normal operation; it is
// saturated here to keep the block safe. Purely combinational.
module trivial_rotator #(
  parameter int W = 16
) (
  input  logic               rot,           // 1: multiply by -j
  input  logic signed [W-1:0] x_re, x_im,
  output logic signed [W-1:0] y_re, y_im
);
  localparam logic signed [W-1:0] MAXV = {1'b0, {(W-1){1'b1}}};
  localparam logic signed [W-1:0] MINV = {1'b1, {(W-1){1'b0}}};

  logic signed [W-1:0] neg_re;

  always_comb begin
    neg_re = (x_re == MINV) ? MAXV : -x_re;
    if (rot) begin
      y_re = x_im;
      y_im = neg_re;
    end else begin
      y_re = x_re;
      y_im = x_im;
    end
  end
endmodule
