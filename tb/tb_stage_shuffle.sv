// tb_stage_shuffle: the five shuffles of a 64-point, 8-parallel pipeline
// (two lane permutations, then commutators of depth 4, 2, 1) side by side.
// Each input sample is tagged with its frame index under the bit placement of
// the stage before the shuffle; at the output, lane l at time tau must carry
// the index that the placement of the next stage puts there. Frames run back
// to back, then after an idle gap. Latency: 0 for permutations, 2^J otherwise.
module tb_stage_shuffle;
  import fft_pkg::*;
  localparam int N_LOG2 = 6, P_LOG2 = 3, W = 10;
  localparam int P = 1 << P_LOG2, T = (1 << N_LOG2) / P, SB = N_LOG2 - P_LOG2;
  localparam int NS = N_LOG2 - 1;

  logic clk = 0, rst_n = 0;
  side_t in_side [NS];
  side_t out_side [NS];
  logic signed [W-1:0] in_re [NS][P], in_im [NS][P], out_re [NS][P], out_im [NS][P];
  int checks = 0, failures = 0;

  for (genvar s = 1; s <= NS; s++) begin : g_dut
    stage_shuffle #(.N_LOG2(N_LOG2), .P_LOG2(P_LOG2), .STAGE(s), .W(W)) dut (
      .clk, .rst_n, .in_side(in_side[s-1]),
      .in_re(in_re[s-1]), .in_im(in_im[s-1]),
      .out_side(out_side[s-1]), .out_re(out_re[s-1]), .out_im(out_im[s-1]));
  end

  always #5 clk = ~clk;

  function automatic int frame_index(int s, int lane, int t);
    int where [N_LOG2];
    int tmp, idx;
    for (int i = 0; i < N_LOG2; i++)
      where[i] = (i >= SB) ? (N_LOG2 - 1 - i) : (P_LOG2 + i);
    for (int u = 1; u < s; u++) begin
      // after the first stage of a group of four, from the commutator
      // stages on, the lane-0 bit moves to lane 1 and lane 1 comes down first
      if (P_LOG2 >= 2 && u >= P_LOG2 && u % 4 == 1)
        for (int i = 0; i < N_LOG2; i++)
          if (where[i] == 0) where[i] = 1; else if (where[i] == 1) where[i] = 0;
      for (int i = 0; i < N_LOG2; i++)
        if (where[i] == 0) tmp = i;
      where[tmp] = where[N_LOG2 - u - 1]; where[N_LOG2 - u - 1] = 0;
    end
    idx = 0;
    for (int i = 0; i < N_LOG2; i++)
      if (where[i] < P_LOG2) idx |= ((lane >> where[i]) & 1) << i;
      else                   idx |= ((t >> (where[i] - P_LOG2)) & 1) << i;
    return idx;
  endfunction

  initial begin
    for (int s = 0; s < NS; s++) in_side[s] = '0;
    repeat (2) @(posedge clk);
    rst_n <= 1;
    for (int fr = 0; fr < 5; fr++) begin
      if (fr == 3) begin
        for (int s = 0; s < NS; s++) in_side[s] <= '0;
        repeat (5) @(posedge clk);
      end
      for (int t = 0; t < T; t++) begin
        for (int s = 1; s <= NS; s++) begin
          in_side[s-1] <= '{valid: 1'b1, first: (t == 0), inv: 1'b0};
          for (int l = 0; l < P; l++) begin
            in_re[s-1][l] <= W'(frame_index(s, l, t) | (fr << 6));
            in_im[s-1][l] <= W'(~(frame_index(s, l, t) | (fr << 6)));
          end
        end
        @(posedge clk);
      end
    end
    for (int s = 0; s < NS; s++) in_side[s] <= '0;
  end

  // one checker per shuffle
  int done [NS];
  for (genvar s = 1; s <= NS; s++) begin : g_chk
    initial begin
      int tau, fr, exp_v;
      tau = 0; fr = 0; done[s-1] = 0;
      @(posedge rst_n);
      while (fr < 5) begin
        #1;
        if (out_side[s-1].valid) begin
          checks++;
          if (out_side[s-1].first != (tau == 0)) begin failures++; $display("shuffle %0d: first flag", s); end
          for (int l = 0; l < P; l++) begin
            exp_v = frame_index(s + 1, l, tau) | (fr << 6);
            checks++;
            if (out_re[s-1][l] != W'(exp_v) || out_im[s-1][l] != W'(~exp_v)) begin
              failures++;
              if (failures < 10) $display("shuffle %0d frame %0d tau %0d lane %0d: got %0d expected %0d",
                                          s, fr, tau, l, out_re[s-1][l], exp_v);
            end
          end
          tau++;
          if (tau == T) begin tau = 0; fr++; end
        end
        @(posedge clk);
      end
      done[s-1] = 1;
    end
  end

  initial begin
    int all;
    do begin
      @(posedge clk);
      all = 1;
      for (int s = 0; s < NS; s++) all &= done[s];
    end while (!all);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
