// fft_stage: one stage of the P-parallel feedforward radix-2^4 FFT.
//
// The stage has P/2 radix-2 butterflies on the lane pairs (2m, 2m+1) and, on
// each lane, the rotator that the radix-2^4 schedule puts after this stage:
// none, a trivial -j rotator, a W16 constant rotator or a general rotator.
// A lane gets a rotator only if some sample reaching it needs a non-zero
// rotation; this is decided at elaboration time from the index map of fft_pkg.
// The rotation of a sample depends only on its frame index I, which each lane
// rebuilds from its lane number and the time-in-frame counter.
//
// Rotation after stage s (group gi = (s-1)/4, position u = s - 4*gi, and
// d0..d3 the index bits b(n-4gi-1) .. b(n-4gi-4) that the group's four
// butterflies act on):
//   u = 1 : -j          if d0 & d1
//   u = 2 : W16^e,      e = (2*d2 + d3) * (d0 + 2*d1)
//   u = 3 : -j          if d2 & d3
//   u = 4 : W_N^phi,    phi = 2^(4*gi) * (I mod 2^(n-s)) * (d0 + 2*d1 + 4*d2 + 8*d3)
// (a shorter last group of 3 or 2 stages uses the radix-2 kernel of 8 or 4
// points). The u = 1..4 pattern is that of the radix-2^4 DIF signal flow
// graph; the bit map and the rotator placement are this design's own.
//
// Timing: two register stages (butterflies, then rotators); the side-band is
// delayed with the data. Output words are one bit wider than the input.
module fft_stage
  import fft_pkg::*;
#(
  parameter int N_LOG2 = 12,
  parameter int P_LOG2 = 3,
  parameter int STAGE  = 1,       // 1 .. N_LOG2
  parameter int WI     = 16,      // input word width
  parameter int CW     = 16       // twiddle coefficient width
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  side_t                in_side,
  input  logic signed [WI-1:0] in_re  [1 << P_LOG2],
  input  logic signed [WI-1:0] in_im  [1 << P_LOG2],
  output side_t                out_side,
  output logic signed [WI:0]   out_re [1 << P_LOG2],
  output logic signed [WI:0]   out_im [1 << P_LOG2]
);
  localparam int P  = 1 << P_LOG2;
  localparam int WO = WI + 1;
  localparam int SB = N_LOG2 - P_LOG2;          // serial (time) bits
  localparam rot_kind_e KIND = rot_kind(N_LOG2, STAGE);
  localparam int GI = (STAGE - 1) / RADIX_K;
  localparam int U  = STAGE - RADIX_K * GI;
  localparam int KK = (N_LOG2 - RADIX_K * GI < RADIX_K) ? N_LOG2 - RADIX_K * GI : RADIX_K;
  localparam int HI = N_LOG2 - RADIX_K * GI - 1;

  function automatic int clampb(int b);
    return (b < 0) ? 0 : b;
  endfunction

  // Rotation exponent of the sample with frame index idx after this stage:
  // W16 units for trivial and constant rotations, W_N units for general ones.
  function automatic logic [N_LOG2-1:0] rot_exp(logic [N_LOG2-1:0] idx);
    logic d0, d1, d2, d3;
    logic [N_LOG2-1:0] j2, k1, e;
    d0 = idx[HI];
    d1 = (KK > 1) ? idx[clampb(HI-1)] : 1'b0;
    d2 = (KK > 2) ? idx[clampb(HI-2)] : 1'b0;
    d3 = (KK > 3) ? idx[clampb(HI-3)] : 1'b0;
    e  = '0;
    if (KK == 4) begin
      if (U == 1)      e = (d0 & d1) ? N_LOG2'(4) : '0;
      else if (U == 2) e = N_LOG2'((2*d2 + d3) * (d0 + 2*d1));
      else if (U == 3) e = (d2 & d3) ? N_LOG2'(4) : '0;
      else if (STAGE < N_LOG2) begin
        j2 = idx & ((N_LOG2'(1) << (N_LOG2 - STAGE)) - 1'b1);
        k1 = N_LOG2'(d0 + 2*d1 + 4*d2 + 8*d3);
        e  = (j2 * k1) << (RADIX_K * GI);
      end
    end else if (KK == 3) begin
      if (U == 1)      e = N_LOG2'(2 * d0 * (2*d1 + d2));
      else if (U == 2) e = (d1 & d2) ? N_LOG2'(4) : '0;
    end else if (KK == 2) begin
      if (U == 1)      e = (d0 & d1) ? N_LOG2'(4) : '0;
    end
    return e;
  endfunction

  // Frame index of lane `lane` at time `t` at the input of this stage.
  function automatic logic [N_LOG2-1:0] index_of(int lane, logic [SB-1:0] t);
    logic [N_LOG2-1:0] v, idx;
    v = {t, P_LOG2'(lane)};
    for (int i = 0; i < N_LOG2; i++) idx[i] = v[bit_home(N_LOG2, P_LOG2, STAGE, i)];
    return idx;
  endfunction

  // ---- butterflies -------------------------------------------------------
  logic signed [WO-1:0] bf_re [P];
  logic signed [WO-1:0] bf_im [P];
  logic signed [WO-1:0] bs_re [P];
  logic signed [WO-1:0] bs_im [P];
  side_t                side1;

  for (genvar m = 0; m < P/2; m++) begin : g_bu
    radix2_bu #(.W(WI)) u_bu (
      .a_re(in_re[2*m]),   .a_im(in_im[2*m]),
      .b_re(in_re[2*m+1]), .b_im(in_im[2*m+1]),
      .s_re(bs_re[2*m]),   .s_im(bs_im[2*m]),
      .d_re(bs_re[2*m+1]), .d_im(bs_im[2*m+1]));
  end

  always_ff @(posedge clk) begin
    for (int l = 0; l < P; l++) begin
      bf_re[l] <= bs_re[l];
      bf_im[l] <= bs_im[l];
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      side1    <= '0;
      out_side <= '0;
    end else begin
      side1    <= in_side;
      out_side <= side1;
    end
  end

  // ---- time-in-frame counter of the rotator column -----------------------
  logic [SB-1:0] cnt_q, t_cur;
  assign t_cur = (side1.valid && side1.first) ? '0 : cnt_q;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) cnt_q <= '0;
    else        cnt_q <= t_cur + 1'b1;
  end

  // ---- rotators ----------------------------------------------------------
  for (genvar l = 0; l < P; l++) begin : g_lane
    localparam logic [N_LOG2-1:0] E_MAX = rot_exp(index_of(l, '1));
    localparam bit ACTIVE = (KIND != ROT_NONE) && (E_MAX != '0);

    logic [N_LOG2-1:0]    e;
    logic signed [WO-1:0] r_re, r_im;

    assign e = rot_exp(index_of(l, t_cur));

    if (ACTIVE && KIND == ROT_TRIVIAL) begin : g_triv
      trivial_rotator #(.W(WO)) u_rot (
        .rot(e[2]), .x_re(bf_re[l]), .x_im(bf_im[l]), .y_re(r_re), .y_im(r_im));
    end else if (ACTIVE && KIND == ROT_CONST) begin : g_const
      const_rotator_w16 #(.W(WO), .CW(CW)) u_rot (
        .e(e[3:0]), .x_re(bf_re[l]), .x_im(bf_im[l]), .y_re(r_re), .y_im(r_im));
    end else if (ACTIVE && KIND == ROT_GENERAL) begin : g_gen
      general_rotator #(.N_LOG2(N_LOG2), .W(WO), .CW(CW)) u_rot (
        .phi(e), .x_re(bf_re[l]), .x_im(bf_im[l]), .y_re(r_re), .y_im(r_im));
    end else begin : g_none
      assign r_re = bf_re[l];
      assign r_im = bf_im[l];
    end

    always_ff @(posedge clk) begin
      out_re[l] <= r_re;
      out_im[l] <= r_im;
    end
  end
endmodule
