// tb_radix2_bu: random and corner-case operands for the radix-2 butterfly;
// sum and difference are compared with integer arithmetic done here.
module tb_radix2_bu;
  localparam int W = 16;
  logic signed [W-1:0] a_re, a_im, b_re, b_im;
  logic signed [W:0]   s_re, s_im, d_re, d_im;
  int checks = 0, failures = 0;

  radix2_bu #(.W(W)) dut (.*);

  task automatic check(int ar, int ai, int br, int bi);
    a_re = W'(ar); a_im = W'(ai); b_re = W'(br); b_im = W'(bi);
    #1;
    checks++;
    if (s_re != ar + br || s_im != ai + bi || d_re != ar - br || d_im != ai - bi) begin
      failures++;
      $display("a=(%0d,%0d) b=(%0d,%0d): s=(%0d,%0d) d=(%0d,%0d)", ar, ai, br, bi, s_re, s_im, d_re, d_im);
    end
  endtask

  initial begin
    check(32767, 32767, 32767, 32767);
    check(-32768, -32768, -32768, -32768);
    check(-32768, 32767, 32767, -32768);
    for (int i = 0; i < 2000; i++)
      check(int'($urandom_range(65535)) - 32768, int'($urandom_range(65535)) - 32768,
            int'($urandom_range(65535)) - 32768, int'($urandom_range(65535)) - 32768);
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
