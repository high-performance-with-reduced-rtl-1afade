// const_rotator_w16: multiplies a complex sample by W16^e = exp(-j*2*pi*e/16).
//
// This is the constant ("3-") rotator of the radix-2^4 stages s = 4i+2. The
// exponent is split into a quarter turn q = e[3:2] and a residual angle
// r = e[1:0] in {0, pi/8, pi/4, 3*pi/8}. Coefficient selection picks the
// (cos, sin) pair of the residual angle from only three constants
// (cos pi/8, sin pi/8, cos pi/4; 3*pi/8 reuses the pi/8 pair with the roles
// swapped), and each constant product is built from shifts and adds, so there
// is no general multiplier. The quarter turn is then a swap and sign change.
// Constants have CW bits with CW-1 fractional bits; products are rounded to
// the input width and saturated. Purely combinational.
module const_rotator_w16
  import fft_pkg::*;
#(
  parameter int W  = 16,     // sample word width
  parameter int CW = 16      // coefficient width (CW-1 fractional bits)
) (
  input  logic [3:0]          e,            // rotation W16^e
  input  logic signed [W-1:0] x_re, x_im,
  output logic signed [W-1:0] y_re, y_im
);
  localparam int PW = W + CW + 2;            // product/accumulator width
  localparam logic [CW-1:0] K_C8 = CW'(trig_q(1, 4, CW, 1'b0));  // cos(pi/8)
  localparam logic [CW-1:0] K_S8 = CW'(trig_q(1, 4, CW, 1'b1));  // sin(pi/8)
  localparam logic [CW-1:0] K_C4 = CW'(trig_q(2, 4, CW, 1'b0));  // cos(pi/4)

  localparam logic signed [W-1:0] MAXV = {1'b0, {(W-1){1'b1}}};
  localparam logic signed [W-1:0] MINV = {1'b1, {(W-1){1'b0}}};

  // Multiplication by a constant as a sum of shifted copies of x.
  function automatic logic signed [PW-1:0] mul_k(logic signed [W-1:0] x, logic [CW-1:0] k);
    logic signed [PW-1:0] acc;
    acc = '0;
    for (int b = 0; b < CW; b++)
      if (k[b]) acc = acc + (PW'(x) <<< b);
    return acc;
  endfunction

  function automatic logic signed [W-1:0] round_sat(logic signed [PW-1:0] v);
    logic signed [PW-1:0] r;
    r = (v + (PW'(1) <<< (CW - 2))) >>> (CW - 1);
    if (r > PW'(MAXV))      return MAXV;
    else if (r < PW'(MINV)) return MINV;
    else                    return r[W-1:0];
  endfunction

  logic signed [PW-1:0] re_c8, re_s8, im_c8, im_s8, sum_c4, dif_c4;
  logic signed [W-1:0]  f_re, f_im;     // after the residual angle
  logic signed [W-1:0]  n_re, n_im;

  always_comb begin
    re_c8  = mul_k(x_re, K_C8);
    re_s8  = mul_k(x_re, K_S8);
    im_c8  = mul_k(x_im, K_C8);
    im_s8  = mul_k(x_im, K_S8);
    sum_c4 = mul_k(x_re, K_C4) + mul_k(x_im, K_C4);
    dif_c4 = mul_k(x_im, K_C4) - mul_k(x_re, K_C4);

    // (x_re + j x_im)(c - j s) = (x_re c + x_im s) + j (x_im c - x_re s)
    unique case (e[1:0])
      2'd0: begin f_re = x_re;                    f_im = x_im;                    end
      2'd1: begin f_re = round_sat(re_c8 + im_s8); f_im = round_sat(im_c8 - re_s8); end
      2'd2: begin f_re = round_sat(sum_c4);        f_im = round_sat(dif_c4);        end
      default: begin f_re = round_sat(re_s8 + im_c8); f_im = round_sat(im_s8 - re_c8); end
    endcase

    n_re = (f_re == MINV) ? MAXV : -f_re;
    n_im = (f_im == MINV) ? MAXV : -f_im;
    // quarter turns: multiply by (-j)^q
    unique case (e[3:2])
      2'd0: begin y_re = f_re; y_im = f_im; end
      2'd1: begin y_re = f_im; y_im = n_re; end
      2'd2: begin y_re = n_re; y_im = n_im; end
      default: begin y_re = n_im; y_im = f_re; end
    endcase
  end
endmodule
