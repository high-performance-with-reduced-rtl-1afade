// delay_commutator: data shuffling between two pipeline stages of the
// feedforward MDC FFT, for one pair of lanes.
//
// It exchanges the index bit carried by the lane pair (upper lane = bit 0,
// lower lane = bit 1) with time bit j of the frame, D = 2^j: samples of the
// lower lane with time bit j = 0 trade places with samples of the upper lane
// with time bit j = 1. Structure, as drawn in MDC FFT diagrams: a delay of D
// on the lower input, a crossbar of two multiplexers switched by time bit j,
// and a delay of D on the upper output. Total buffer: 2D words per lane pair.
// The time counter restarts on the first sample of every frame and runs freely
// otherwise, so frames may be separated by idle cycles but each frame must be
// contiguous. Latency: D cycles for both lanes and for the side-band.
module delay_commutator
  import fft_pkg::*;
#(
  parameter int W     = 16,
  parameter int J     = 0,        // time bit exchanged; delay D = 2^J
  parameter int CNT_W = 9         // width of the time-in-frame counter, > J
) (
  input  logic                clk,
  input  logic                rst_n,
  input  side_t               in_side,
  input  logic signed [W-1:0] a_re, a_im,     // upper lane in
  input  logic signed [W-1:0] b_re, b_im,     // lower lane in
  output side_t               out_side,
  output logic signed [W-1:0] u_re, u_im,     // upper lane out
  output logic signed [W-1:0] l_re, l_im      // lower lane out
);
  localparam int D = 1 << J;

  logic [CNT_W-1:0] cnt_q, cnt;
  logic             sel;
  logic [2*W-1:0]   b_d, x_up;
  side_t            side_sr [D];

  assign cnt = (in_side.valid && in_side.first) ? '0 : cnt_q;
  assign sel = cnt[J];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) cnt_q <= '0;
    else        cnt_q <= cnt + 1'b1;
  end

  delay_line #(.W(2*W), .D(D)) u_dl_lo (
    .clk(clk), .rst_n(rst_n), .din({b_re, b_im}), .dout(b_d));

  assign x_up = sel ? b_d : {a_re, a_im};
  assign {l_re, l_im} = sel ? {a_re, a_im} : b_d;

  delay_line #(.W(2*W), .D(D)) u_dl_up (
    .clk(clk), .rst_n(rst_n), .din(x_up), .dout({u_re, u_im}));

  // side-band delayed by D cycles, reset to "no frame"
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < D; i++) side_sr[i] <= '0;
    end else begin
      side_sr[0] <= in_side;
      for (int i = 1; i < D; i++) side_sr[i] <= side_sr[i-1];
    end
  end
  assign out_side = side_sr[D-1];
endmodule
