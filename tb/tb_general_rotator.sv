// tb_general_rotator: random angles phi (all 4096 of them at least once) and
// random samples inside the circle of radius 2^(W-1); the result is compared
// with x * exp(-j*2*pi*phi/N) in floating point. Allowed error per component:
// 0.5 LSB of rounding plus (|re| + |im|) * 2^-CW of coefficient quantisation.
module tb_general_rotator;
  localparam int N_LOG2 = 12, W = 20, CW = 16;
  logic [N_LOG2-1:0] phi;
  logic signed [W-1:0] x_re, x_im, y_re, y_im;
  int checks = 0, failures = 0;

  general_rotator #(.N_LOG2(N_LOG2), .W(W), .CW(CW)) dut (.*);

  initial begin
    int r, i, ph;
    real a, er, ei, lim, tol;
    lim = real'(1 << (W-1)) - 2.0;
    for (int n = 0; n < 3 * (1 << N_LOG2); n++) begin
      do begin
        r = int'($urandom_range(2*(1 << (W-1)) - 2)) - (1 << (W-1)) + 1;
        i = int'($urandom_range(2*(1 << (W-1)) - 2)) - (1 << (W-1)) + 1;
      end while (real'(r)*real'(r) + real'(i)*real'(i) >= lim*lim);
      ph  = (n < (1 << N_LOG2)) ? n : int'($urandom_range((1 << N_LOG2) - 1));
      phi = N_LOG2'(ph);
      x_re = W'(r); x_im = W'(i);
      #1;
      a  = -2.0 * 3.14159265358979323846 * real'(ph) / real'(1 << N_LOG2);
      er = real'(y_re) - (real'(r) * $cos(a) - real'(i) * $sin(a));
      ei = real'(y_im) - (real'(r) * $sin(a) + real'(i) * $cos(a));
      // rounding (0.5 LSB) plus coefficient quantisation (2^-CW per coefficient)
      tol = 0.501 + (((r < 0) ? -real'(r) : real'(r)) + ((i < 0) ? -real'(i) : real'(i))) / real'(1 << CW);
      checks++;
      if (er > tol || er < -tol || ei > tol || ei < -tol) begin
        failures++;
        if (failures < 10) $display("phi=%0d x=(%0d,%0d) y=(%0d,%0d) err=(%f,%f)", ph, r, i, y_re, y_im, er, ei);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
