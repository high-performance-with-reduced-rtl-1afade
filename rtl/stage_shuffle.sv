// stage_shuffle: the data reordering between stage STAGE and stage STAGE+1.
//
// It moves index bit b(n-STAGE-1), the butterfly bit of the next stage, onto
// lane bit 0 and puts the bit that was there in its place.
//  * STAGE < p: that bit is lane bit STAGE, so the exchange is a fixed
//    permutation of lanes (the crossing wires of MDC diagrams); no latency.
//  * STAGE >= p: it is time bit J = n-STAGE-1, so every lane pair (2m, 2m+1)
//    gets a delay_commutator of depth 2^J; latency 2^J cycles. When STAGE is
//    the first stage of a group of four (and p >= 2), lane bits 0 and 1 are
//    exchanged by wiring ahead of the commutators: the bit just used by the
//    butterfly moves to lane bit 1 instead of into the delay memory.
// Over a whole pipeline the depths are 2^(n-p-1), ..., 2, 1, i.e. 2*(N/P - 1)
// words per lane pair and N - P words in total.
module stage_shuffle
  import fft_pkg::*;
#(
  parameter int N_LOG2 = 12,
  parameter int P_LOG2 = 3,
  parameter int STAGE  = 3,       // 1 .. N_LOG2-1
  parameter int W      = 16
) (
  input  logic                clk,
  input  logic                rst_n,
  input  side_t               in_side,
  input  logic signed [W-1:0] in_re  [1 << P_LOG2],
  input  logic signed [W-1:0] in_im  [1 << P_LOG2],
  output side_t               out_side,
  output logic signed [W-1:0] out_re [1 << P_LOG2],
  output logic signed [W-1:0] out_im [1 << P_LOG2]
);
  localparam int P = 1 << P_LOG2;

  if (STAGE < P_LOG2) begin : g_wire
    for (genvar l = 0; l < P; l++) begin : g_lane
      // lane number with bits 0 and STAGE exchanged
      localparam int B0 = l & 1;
      localparam int BS = (l >> STAGE) & 1;
      localparam int SRC = (l & ~(1 | (1 << STAGE))) | (BS) | (B0 << STAGE);
      assign out_re[l] = in_re[SRC];
      assign out_im[l] = in_im[SRC];
    end
    assign out_side = in_side;
  end else begin : g_comm
    localparam int J = N_LOG2 - STAGE - 1;
    side_t side_o [P/2];
    logic signed [W-1:0] x_re [P], x_im [P];
    for (genvar l = 0; l < P; l++) begin : g_pre
      // optional exchange of lane bits 0 and 1 ahead of the commutators
      localparam int SRC = keeps_lane1(P_LOG2, STAGE) ? ((l & ~3) | ((l & 1) << 1) | ((l >> 1) & 1)) : l;
      assign x_re[l] = in_re[SRC];
      assign x_im[l] = in_im[SRC];
    end
    for (genvar m = 0; m < P/2; m++) begin : g_pair
      delay_commutator #(.W(W), .J(J), .CNT_W(N_LOG2 - P_LOG2)) u_dc (
        .clk(clk), .rst_n(rst_n), .in_side(in_side),
        .a_re(x_re[2*m]),   .a_im(x_im[2*m]),
        .b_re(x_re[2*m+1]), .b_im(x_im[2*m+1]),
        .out_side(side_o[m]),
        .u_re(out_re[2*m]),   .u_im(out_im[2*m]),
        .l_re(out_re[2*m+1]), .l_im(out_im[2*m+1]));
    end
    assign out_side = side_o[0];   // identical in every pair
  end
endmodule
