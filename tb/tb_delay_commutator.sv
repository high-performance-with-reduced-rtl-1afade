// tb_delay_commutator: frames of 16 cycles (4 time bits) through a commutator
// that exchanges the lane bit with time bit J = 2 (D = 4). Every sample is
// tagged with its lane bit and time; after D cycles the upper lane at output
// time tau must carry the sample (lane tau[J], time tau with bit J cleared) and
// the lower lane the sample (lane tau[J], time tau with bit J set). Frames run
// back to back and also with an idle gap between them.
module tb_delay_commutator;
  import fft_pkg::*;
  localparam int W = 12, J = 2, CNT_W = 4;
  localparam int D = 1 << J, T = 1 << CNT_W;

  logic clk = 0, rst_n = 0;
  side_t in_side, out_side;
  logic signed [W-1:0] a_re, a_im, b_re, b_im, u_re, u_im, l_re, l_im;
  int checks = 0, failures = 0;

  delay_commutator #(.W(W), .J(J), .CNT_W(CNT_W)) dut (.*);

  always #5 clk = ~clk;

  // tag: frame (4 bits) | lane (1 bit) | time (4 bits); imaginary = ~tag
  function automatic logic [W-1:0] tag(int fr, int lane, int t);
    return W'((fr << 5) | (lane << 4) | t);
  endfunction

  int frames_out = 0;

  initial begin
    in_side = '0;
    a_re = '0; a_im = '0; b_re = '0; b_im = '0;
    repeat (2) @(posedge clk);
    rst_n <= 1;
    for (int fr = 0; fr < 6; fr++) begin
      if (fr == 3) begin
        in_side <= '0;
        repeat (3) @(posedge clk);
      end
      for (int t = 0; t < T; t++) begin
        in_side <= '{valid: 1'b1, first: (t == 0), inv: 1'b0};
        a_re <= tag(fr, 0, t); a_im <= ~tag(fr, 0, t);
        b_re <= tag(fr, 1, t); b_im <= ~tag(fr, 1, t);
        @(posedge clk);
      end
    end
    in_side <= '0;
  end

  initial begin
    int tau, fr;
    tau = 0; fr = 0;
    @(posedge rst_n);
    while (fr < 6) begin
      @(posedge clk);
      if (out_side.valid) begin
        checks += 3;
        if (out_side.first != (tau == 0)) begin failures++; $display("first flag wrong at tau %0d", tau); end
        if (u_re != tag(fr, (tau >> J) & 1, tau & ~(1 << J)) || u_im != ~u_re) begin
          failures++; $display("frame %0d tau %0d upper %h", fr, tau, u_re);
        end
        if (l_re != tag(fr, (tau >> J) & 1, tau | (1 << J)) || l_im != ~l_re) begin
          failures++; $display("frame %0d tau %0d lower %h", fr, tau, l_re);
        end
        tau++;
        if (tau == T) begin tau = 0; fr++; frames_out++; end
      end
    end
    checks++;
    if (frames_out != 6) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (1000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
