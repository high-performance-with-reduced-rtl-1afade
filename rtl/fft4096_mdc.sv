// fft4096_mdc: P-parallel N-point pipelined feedforward FFT/IFFT processor,
// radix-2^4, multipath delay commutator (MDC). Defaults: N = 4096, P = 8.
//
// Every clock cycle P complex samples enter and P complex results leave, so a
// frame takes N/P = 512 cycles and frames may follow each other without gaps.
// The pipeline is n = log2 N stages (fft_stage: butterflies and rotators)
// joined by n-1 shuffles (stage_shuffle: lane wiring for the first p-1, delay
// commutators of depth 2^(n-p-1) ... 1 for the rest).
// The organisation (8-parallel radix-2^4 feedforward MDC at 4096 points, the
// rotation schedule, N-P words of buffer) follows the published architecture;
// the input order, the exact bit placement (see fft_pkg), word lengths,
// framing and IFFT method are this design's own.
//
// Input order: in cycle t of a frame, lane l carries sample
//   x[ l[0]*N/2 + l[1]*N/4 + ... + l[p-1]*N/2^p + t ],
// i.e. each lane carries one N/P-long block of the frame, with the lane number
// bit-reversed. Output order: out_bin[l] gives the frequency index carried by
// lane l in the current cycle (the DIF outputs are in a permuted order; no
// reordering memory is included).
//
// Framing: in_valid must be high for N/P consecutive cycles per frame; idle
// cycles between frames are allowed. in_inverse is sampled on the first cycle
// of a frame. An inverse frame is computed as swap(FFT(swap(x))), with
// swap(re, im) = (im, re), which gives N times the inverse DFT.
//
// Word length: WIN-bit input, one bit of growth per stage, WIN + n bit output,
// no scaling; twiddles have CW bits. Inputs must lie inside the circle of
// radius 2^(WIN-1) so that rotations cannot overflow.
//
// Latency from a frame's first input cycle to its first output cycle:
// 2*n + N/P - 1 cycles (535 at the defaults).
module fft4096_mdc
  import fft_pkg::*;
#(
  parameter int N_LOG2 = 12,                 // N = 4096 points
  parameter int P_LOG2 = 3,                  // P = 8 samples per cycle
  parameter int WIN    = 16,                 // input word width
  parameter int CW     = 16,                 // twiddle coefficient width
  localparam int P     = 1 << P_LOG2,
  localparam int WOUT  = WIN + N_LOG2
) (
  input  logic                   clk,
  input  logic                   rst_n,
  input  logic                   in_valid,
  input  logic                   in_inverse,
  input  logic signed [WIN-1:0]  in_re   [P],
  input  logic signed [WIN-1:0]  in_im   [P],
  output logic                   out_valid,
  output logic                   out_first,
  output logic                   out_inverse,
  output logic signed [WOUT-1:0] out_re  [P],
  output logic signed [WOUT-1:0] out_im  [P],
  output logic [N_LOG2-1:0]      out_bin [P]
);
  localparam int SB = N_LOG2 - P_LOG2;

  // ---- input framing -----------------------------------------------------
  logic [SB-1:0] icnt;
  logic          inv_hold;
  side_t         side_in;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      icnt     <= '0;
      inv_hold <= 1'b0;
    end else if (in_valid) begin
      icnt <= icnt + 1'b1;
      if (icnt == '0) inv_hold <= in_inverse;
    end
  end

  assign side_in.valid = in_valid;
  assign side_in.first = in_valid && (icnt == '0);
  assign side_in.inv   = (icnt == '0) ? in_inverse : inv_hold;

  // a frame, once started, must be contiguous
  a_contiguous: assert property (@(posedge clk) disable iff (!rst_n)
    (icnt != '0) |-> in_valid);

  // ---- pipeline ------------------------------------------------------------
  // st_*[s] is the input of stage s+1 (all words WOUT bits wide, sign-extended)
  logic signed [WOUT-1:0] st_re [N_LOG2+1][P];
  logic signed [WOUT-1:0] st_im [N_LOG2+1][P];
  side_t                  st_side [N_LOG2+1];

  for (genvar l = 0; l < P; l++) begin : g_in
    // inverse transform: exchange real and imaginary parts
    assign st_re[0][l] = WOUT'(side_in.inv ? in_im[l] : in_re[l]);
    assign st_im[0][l] = WOUT'(side_in.inv ? in_re[l] : in_im[l]);
  end
  assign st_side[0] = side_in;

  for (genvar s = 1; s <= N_LOG2; s++) begin : g_stage
    localparam int WI = WIN + s - 1;
    logic signed [WI-1:0] x_re [P];
    logic signed [WI-1:0] x_im [P];
    logic signed [WI:0]   y_re [P];
    logic signed [WI:0]   y_im [P];
    side_t                y_side;

    for (genvar l = 0; l < P; l++) begin : g_trunc
      assign x_re[l] = st_re[s-1][l][WI-1:0];
      assign x_im[l] = st_im[s-1][l][WI-1:0];
    end

    fft_stage #(.N_LOG2(N_LOG2), .P_LOG2(P_LOG2), .STAGE(s), .WI(WI), .CW(CW)) u_stage (
      .clk(clk), .rst_n(rst_n),
      .in_side(st_side[s-1]), .in_re(x_re), .in_im(x_im),
      .out_side(y_side), .out_re(y_re), .out_im(y_im));

    if (s < N_LOG2) begin : g_shuf
      logic signed [WI:0] z_re [P];
      logic signed [WI:0] z_im [P];
      stage_shuffle #(.N_LOG2(N_LOG2), .P_LOG2(P_LOG2), .STAGE(s), .W(WI + 1)) u_shuf (
        .clk(clk), .rst_n(rst_n),
        .in_side(y_side), .in_re(y_re), .in_im(y_im),
        .out_side(st_side[s]), .out_re(z_re), .out_im(z_im));
      for (genvar l = 0; l < P; l++) begin : g_ext
        assign st_re[s][l] = WOUT'(z_re[l]);
        assign st_im[s][l] = WOUT'(z_im[l]);
      end
    end else begin : g_last
      assign st_side[s] = y_side;
      for (genvar l = 0; l < P; l++) begin : g_ext
        assign st_re[s][l] = WOUT'(y_re[l]);
        assign st_im[s][l] = WOUT'(y_im[l]);
      end
    end
  end

  // ---- output --------------------------------------------------------------
  side_t         so;
  logic [SB-1:0] ocnt_q, ocnt;
  assign so   = st_side[N_LOG2];
  assign ocnt = (so.valid && so.first) ? '0 : ocnt_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) ocnt_q <= '0;
    else        ocnt_q <= ocnt + 1'b1;
  end

  assign out_valid   = so.valid;
  assign out_first   = so.valid && so.first;
  assign out_inverse = so.inv;

  for (genvar l = 0; l < P; l++) begin : g_out
    logic [N_LOG2-1:0] v, idx;
    assign v = {ocnt, P_LOG2'(l)};
    // frame index position after the last stage; the bin is its bit reverse
    for (genvar i = 0; i < N_LOG2; i++) begin : g_bit
      localparam int H = bit_home(N_LOG2, P_LOG2, N_LOG2, i);
      assign idx[i] = v[H];
      assign out_bin[l][N_LOG2-1-i] = idx[i];
    end
    assign out_re[l] = so.inv ? st_im[N_LOG2][l] : st_re[N_LOG2][l];
    assign out_im[l] = so.inv ? st_re[N_LOG2][l] : st_im[N_LOG2][l];
  end
endmodule
