// twiddle_rom: first-octant cosine/sine table of an N-point FFT.
//
// Because of the symmetry of the FFT angles only the M = N/8 + 1 angles
// 2*pi*i/N, i = 0 .. N/8, in [0, pi/4] are stored; general_rotator derives
// every other angle from them by exchanging cosine and sine and changing
// signs. Entry i holds round(cos(2*pi*i/N) * 2^(CW-1)) and
// round(sin(2*pi*i/N) * 2^(CW-1)) as unsigned CW-bit numbers (1.0 is
// 2^(CW-1), which fits because the values are never negative). The contents
// are computed at elaboration time by fft_pkg::trig_q. Asynchronous read.
module twiddle_rom
  import fft_pkg::*;
#(
  parameter int N_LOG2 = 12,
  parameter int CW     = 16
) (
  input  logic [N_LOG2-3:0] addr,          // 0 .. N/8
  output logic [CW-1:0]     cos_q,
  output logic [CW-1:0]     sin_q
);
  localparam int M = (1 << (N_LOG2 - 3)) + 1;

  logic [CW-1:0] rom_c [M];
  logic [CW-1:0] rom_s [M];

  for (genvar i = 0; i < M; i++) begin : g_entry
    localparam logic [CW-1:0] C = CW'(trig_q(i, N_LOG2, CW, 1'b0));
    localparam logic [CW-1:0] S = CW'(trig_q(i, N_LOG2, CW, 1'b1));
    assign rom_c[i] = C;
    assign rom_s[i] = S;
  end

  always_comb begin
    if (int'(addr) < M) begin
      cos_q = rom_c[addr];
      sin_q = rom_s[addr];
    end else begin
      cos_q = '0;
      sin_q = '0;
    end
  end
endmodule
