// tb_fft_stage: all eight stages of a 256-point, 8-parallel pipeline tested
// side by side, each fed with its own random samples (time counter restarted
// every 32 cycles by the first flag). For every lane the expected result is
// worked out here: the butterfly of the lane pair, then the rotation that the
// radix-2^4 DIF schedule gives to the sample's frame index
// (u = position of the stage in its group of four):
//   u = 1, 3 : -j when the two index bits of this and the next butterfly are 1
//   u = 2    : W16^((2*d2 + d3) * (d0 + 2*d1))
//   u = 4    : W_N^(2^(4*gi) * (I mod 2^(n-s)) * (d0 + 2 d1 + 4 d2 + 8 d3))
// The frame index of a lane is rebuilt from the bit placement: at the input,
// lane bit q holds b(n-1-q) and time bit r holds b(r); after every stage the
// next butterfly bit is exchanged with lane bit 0 (after the first stage of a
// later group, lane bits 0 and 1 trade places before that). Latency must be
// 2 cycles.
// It also counts that every rotator kind acted at least once.
module tb_fft_stage;
  import fft_pkg::*;
  localparam int N_LOG2 = 8, P_LOG2 = 3, WI = 16, CW = 16;
  localparam int N = 1 << N_LOG2, P = 1 << P_LOG2, T = N / P, SB = N_LOG2 - P_LOG2;
  localparam real PI = 3.14159265358979323846;

  logic clk = 0, rst_n = 0;
  side_t in_side;
  side_t out_side [N_LOG2];
  logic signed [WI-1:0] in_re [N_LOG2][P], in_im [N_LOG2][P];
  logic signed [WI:0]   out_re [N_LOG2][P], out_im [N_LOG2][P];
  int checks = 0, failures = 0;
  int n_triv = 0, n_const = 0, n_gen = 0;

  for (genvar s = 1; s <= N_LOG2; s++) begin : g_dut
    fft_stage #(.N_LOG2(N_LOG2), .P_LOG2(P_LOG2), .STAGE(s), .WI(WI), .CW(CW)) dut (
      .clk, .rst_n, .in_side,
      .in_re(in_re[s-1]), .in_im(in_im[s-1]),
      .out_side(out_side[s-1]), .out_re(out_re[s-1]), .out_im(out_im[s-1]));
  end

  always #5 clk = ~clk;

  // frame index of lane `lane` at time t at the input of stage s
  function automatic int frame_index(int s, int lane, int t);
    int where [N_LOG2];        // where[i]: position of bit i; <P_LOG2 lane bit, else time bit
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

  // rotation angle (radians, negative = clockwise) after stage s for index I
  function automatic real angle(int s, int I, output int kind);
    int gi, u, hi, d0, d1, d2, d3, k1, j2;
    gi = (s - 1) / 4; u = s - 4*gi; hi = N_LOG2 - 4*gi - 1;
    d0 = (I >> hi) & 1; d1 = (I >> (hi-1)) & 1; d2 = (I >> (hi-2)) & 1; d3 = (I >> (hi-3)) & 1;
    kind = 0;
    if (u == 1 || u == 3) begin
      if ((u == 1) ? (d0 & d1) : (d2 & d3)) begin kind = 1; return -PI/2; end
      return 0.0;
    end
    if (u == 2) begin
      if ((2*d2 + d3) * (d0 + 2*d1) != 0) kind = 2;
      return -2.0*PI*real'((2*d2 + d3) * (d0 + 2*d1)) / 16.0;
    end
    if (s == N_LOG2) return 0.0;
    j2 = I % (1 << (N_LOG2 - s));
    k1 = d0 + 2*d1 + 4*d2 + 8*d3;
    if (j2 * k1 != 0) kind = 3;
    return -2.0*PI*real'((1 << (4*gi)) * j2 * k1) / real'(N);
  endfunction

  int hre [4][N_LOG2][P], him [4][N_LOG2][P];   // inputs of the last cycles
  int htime [4];

  initial begin
    int r, i, t, c;
    in_side = '0;
    repeat (2) @(posedge clk);
    rst_n <= 1;
    t = 0;
    for (c = 0; c < 8 * T + 3; c++) begin
      in_side = '{valid: 1'b1, first: (t == 0), inv: 1'b0};
      for (int s = 0; s < N_LOG2; s++)
        for (int l = 0; l < P; l++) begin
          do begin
            r = int'($urandom_range(32766)) - 16383;
            i = int'($urandom_range(32766)) - 16383;
          end while (r*r + i*i >= 16383*16383);
          in_re[s][l] = WI'(r); in_im[s][l] = WI'(i);
          hre[c % 4][s][l] = r; him[c % 4][s][l] = i;
        end
      htime[c % 4] = t;
      @(posedge clk);
      #1;
      if (c >= 2) begin
        int cc, tt, I, kind, ar, ai, br, bi, xr, xi;
        real a, er, ei, yr, yi, tol;
        cc = (c - 1) % 4;         // inputs sampled two edges ago
        tt = htime[cc];
        for (int s = 1; s <= N_LOG2; s++) begin
          checks++;
          if (out_side[s-1].first != (tt == 0)) begin failures++; $display("stage %0d: first flag", s); end
          for (int l = 0; l < P; l++) begin
            ar = hre[cc][s-1][l & ~1]; ai = him[cc][s-1][l & ~1];
            br = hre[cc][s-1][l | 1];  bi = him[cc][s-1][l | 1];
            xr = (l & 1) ? ar - br : ar + br;
            xi = (l & 1) ? ai - bi : ai + bi;
            I  = frame_index(s, l, tt);
            a  = angle(s, I, kind);
            if (kind == 1) n_triv++;
            if (kind == 2) n_const++;
            if (kind == 3) n_gen++;
            yr = real'(xr) * $cos(a) - real'(xi) * $sin(a);
            yi = real'(xr) * $sin(a) + real'(xi) * $cos(a);
            er = real'(out_re[s-1][l]) - yr;
            ei = real'(out_im[s-1][l]) - yi;
            tol = 1.5;
            checks++;
            if (er > tol || er < -tol || ei > tol || ei < -tol) begin
              failures++;
              if (failures < 10)
                $display("stage %0d lane %0d t %0d I %0d: got (%0d,%0d) expected (%0.1f,%0.1f)",
                         s, l, tt, I, out_re[s-1][l], out_im[s-1][l], yr, yi);
            end
          end
        end
      end
      t = (t + 1) % T;
    end
    checks += 3;
    if (n_triv == 0)  begin failures++; $display("no trivial rotation seen"); end
    if (n_const == 0) begin failures++; $display("no W16 rotation seen"); end
    if (n_gen == 0)   begin failures++; $display("no general rotation seen"); end
    $display("rotations: trivial=%0d w16=%0d general=%0d", n_triv, n_const, n_gen);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20 * T) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
