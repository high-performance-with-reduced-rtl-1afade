// tb_trivial_rotator: checks (re, im) * (-j) = (im, -re) when rot is high and
// the identity when it is low, on random samples inside the valid range.
module tb_trivial_rotator;
  localparam int W = 16;
  logic rot;
  logic signed [W-1:0] x_re, x_im, y_re, y_im;
  int checks = 0, failures = 0;

  trivial_rotator #(.W(W)) dut (.*);

  initial begin
    int r, i;
    for (int n = 0; n < 2000; n++) begin
      r = int'($urandom_range(65534)) - 32767;
      i = int'($urandom_range(65534)) - 32767;
      rot = n[0];
      x_re = W'(r); x_im = W'(i);
      #1;
      checks++;
      if (rot ? (y_re != i || y_im != -r) : (y_re != r || y_im != i)) begin
        failures++;
        $display("rot=%0d x=(%0d,%0d) y=(%0d,%0d)", rot, r, i, y_re, y_im);
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
