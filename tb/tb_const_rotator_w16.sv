// tb_const_rotator_w16: for all 16 exponents and random samples inside the
// circle of radius 2^(W-1), compares the rotator with exp(-j*2*pi*e/16)
// computed in floating point. Allowed error per component:
// 0.5 LSB of rounding plus (|re| + |im|) * 2^-CW of coefficient quantisation.
module tb_const_rotator_w16;
  localparam int W = 18, CW = 16;
  logic [3:0] e;
  logic signed [W-1:0] x_re, x_im, y_re, y_im;
  int checks = 0, failures = 0;

  const_rotator_w16 #(.W(W), .CW(CW)) dut (.*);

  initial begin
    int r, i;
    real a, er, ei, lim, tol;
    lim = real'(1 << (W-1)) - 2.0;
    for (int n = 0; n < 4000; n++) begin
      do begin
        r = int'($urandom_range(2*(1 << (W-1)) - 2)) - (1 << (W-1)) + 1;
        i = int'($urandom_range(2*(1 << (W-1)) - 2)) - (1 << (W-1)) + 1;
      end while (real'(r)*real'(r) + real'(i)*real'(i) >= lim*lim);
      e = 4'(n);
      x_re = W'(r); x_im = W'(i);
      #1;
      a  = -2.0 * 3.14159265358979323846 * real'(n % 16) / 16.0;
      er = real'(y_re) - (real'(r) * $cos(a) - real'(i) * $sin(a));
      ei = real'(y_im) - (real'(r) * $sin(a) + real'(i) * $cos(a));
      // rounding (0.5 LSB) plus coefficient quantisation (2^-CW per coefficient)
      tol = 0.501 + (((r < 0) ? -real'(r) : real'(r)) + ((i < 0) ? -real'(i) : real'(i))) / real'(1 << CW);
      checks++;
      if (er > tol || er < -tol || ei > tol || ei < -tol) begin
        failures++;
        if (failures < 10) $display("e=%0d x=(%0d,%0d) y=(%0d,%0d) err=(%f,%f)", e, r, i, y_re, y_im, er, ei);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
