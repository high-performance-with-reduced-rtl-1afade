// general_rotator: multiplies a complex sample by W_N^phi = exp(-j*2*pi*phi/N)
// for any phi in 0 .. N-1.
//
// The angle is split into a quadrant q = phi[n-1:n-2] and an angle beta inside
// the quadrant. If beta lies in the first octant its cosine and sine are read
// from twiddle_rom directly; in the second octant the table is read at
// N/8 - offset and cosine and sine change roles. The product
// (x_re + j x_im)(cos - j sin) takes four real multipliers and two adders
// (the rounding constant shares the adders), and the quadrant is applied
// afterwards as a trivial rotation by (-j)^q. The result is rounded to the
// input width and saturated. Purely combinational; fft_stage registers it.
module general_rotator #(
  parameter int N_LOG2 = 12,
  parameter int W      = 16,
  parameter int CW     = 16
) (
  input  logic [N_LOG2-1:0]   phi,
  input  logic signed [W-1:0] x_re, x_im,
  output logic signed [W-1:0] y_re, y_im
);
  localparam int PW = W + CW + 2;
  localparam logic signed [W-1:0] MAXV = {1'b0, {(W-1){1'b1}}};
  localparam logic signed [W-1:0] MINV = {1'b1, {(W-1){1'b0}}};

  logic [N_LOG2-3:0] addr;
  logic [CW-1:0]     t_cos, t_sin;
  logic [CW-1:0]     c, s;
  logic              odd;

  assign odd = phi[N_LOG2-3];
  // octant offset, and its mirror for the second octant
  assign addr = odd ? ((N_LOG2-2)'(1) << (N_LOG2-3)) - (N_LOG2-2)'(phi[N_LOG2-4:0])
                    : (N_LOG2-2)'(phi[N_LOG2-4:0]);

  twiddle_rom #(.N_LOG2(N_LOG2), .CW(CW)) u_rom (
    .addr (addr),
    .cos_q(t_cos),
    .sin_q(t_sin)
  );

  function automatic logic signed [W-1:0] round_sat(logic signed [PW-1:0] v);
    logic signed [PW-1:0] r;
    r = (v + (PW'(1) <<< (CW - 2))) >>> (CW - 1);
    if (r > PW'(MAXV))      return MAXV;
    else if (r < PW'(MINV)) return MINV;
    else                    return r[W-1:0];
  endfunction

  logic signed [PW-1:0] p_rc, p_is, p_ic, p_rs;
  logic signed [W-1:0]  f_re, f_im, n_re, n_im;

  always_comb begin
    c = odd ? t_sin : t_cos;
    s = odd ? t_cos : t_sin;
    p_rc = PW'(x_re) * PW'($signed({1'b0, c}));
    p_is = PW'(x_im) * PW'($signed({1'b0, s}));
    p_ic = PW'(x_im) * PW'($signed({1'b0, c}));
    p_rs = PW'(x_re) * PW'($signed({1'b0, s}));
    f_re = round_sat(p_rc + p_is);
    f_im = round_sat(p_ic - p_rs);

    n_re = (f_re == MINV) ? MAXV : -f_re;
    n_im = (f_im == MINV) ? MAXV : -f_im;
    unique case (phi[N_LOG2-1:N_LOG2-2])
      2'd0: begin y_re = f_re; y_im = f_im; end
      2'd1: begin y_re = f_im; y_im = n_re; end
      2'd2: begin y_re = n_re; y_im = n_im; end
      default: begin y_re = n_im; y_im = f_re; end
    endcase
  end
endmodule
