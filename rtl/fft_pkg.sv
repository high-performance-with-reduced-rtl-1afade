// fft_pkg: types and elaboration-time helpers shared by the feedforward
// radix-2^4 multipath-delay-commutator (MDC) FFT.
//
// Index bookkeeping. A P-parallel N-point frame (N = 2^n, P = 2^p) spends
// N/P clock cycles in the pipeline. Every sample carries a frame index
// I = b(n-1) ... b0. At any point of the pipeline each index bit sits either
// on a lane-number bit (a "parallel" bit, p of them) or on a bit of the
// time-in-frame counter (a "serial" bit, n-p of them). The radix-2 butterfly
// of stage s pairs the samples whose indices differ only in b(n-s), so that
// bit must sit on lane bit 0 when stage s starts. At the input lane bit q holds
// b(n-1-q) and time bit r holds b(r). After stage s the bit b(n-s-1) is swapped
// onto lane bit 0: with fixed wiring while it still is a lane bit (s < p), with
// a delay commutator of depth 2^(n-s-1) once it is a time bit. After the first
// stage of each later group of four, lane bits 0 and 1 also trade places first
// (keeps_lane1), which only rewires lanes but lets fewer lanes rotate.
//
// Twiddle schedule (radix-2^4). Stages are grouped in fours. Within a group the
// 16-point kernel is split 4 x 4: a -j after the 1st and 3rd stage, a W16
// rotation after the 2nd, and a general W_N rotation after the 4th (unless it
// is the last stage). A shorter last group (n not a multiple of 4) uses a
// plain radix-2 kernel. The formulas are in fft_stage.
//
// The general twiddle table stores the N/8+1 angles of the first octant only.
// trig_q() computes its entries at elaboration time by a fixed-point Taylor
// series, so no table file is needed.
package fft_pkg;

  // Side-band that travels with every lane-group of samples.
  typedef struct packed {
    logic valid;   // the lanes carry a sample of a frame
    logic first;   // first cycle of a frame
    logic inv;     // frame is an inverse transform
  } side_t;

  typedef enum logic [1:0] {
    ROT_NONE    = 2'd0,
    ROT_TRIVIAL = 2'd1,   // multiplication by -j or 1
    ROT_CONST   = 2'd2,   // W16^e constant rotator
    ROT_GENERAL = 2'd3    // W_N^e general rotator
  } rot_kind_e;

  localparam int RADIX_K = 4;   // radix-2^4

  // True for the shuffle after the first stage of a radix-2^4 group that ends
  // in a commutator: before the exchange, lane bits 0 and 1 trade places, so
  // the group's first butterfly bit stays on lane bit 1 for the W16 stage.
  // The lanes whose bits 0 and 1 are both zero then never rotate there, which
  // saves a quarter of the W16 rotators of that stage.
  function automatic bit keeps_lane1(int p, int u);
    return p >= 2 && u >= p && (u - 1) % RADIX_K == 0;
  endfunction

  // Where index bit i sits at the input of stage s (1-based):
  // a value q < p is lane bit q, a value p + r is time bit r.
  function automatic int bit_home(int n, int p, int s, int i);
    int pos [64];
    for (int q = 0; q < p; q++) pos[n-1-q] = q;
    for (int r = 0; r < n - p; r++) pos[r] = p + r;
    for (int u = 1; u < s; u++) begin
      if (keeps_lane1(p, u))
        for (int k = 0; k < n; k++)
          if (pos[k] < 2) pos[k] = 1 - pos[k];
      for (int k = 0; k < n; k++)
        if (pos[k] == 0) begin
          pos[k]     = pos[n-u-1];
          pos[n-u-1] = 0;
          break;
        end
    end
    return pos[i];
  endfunction

  // Kind of rotation applied after stage s of an n-stage radix-2^4 FFT.
  function automatic rot_kind_e rot_kind(int n, int s);
    int gi, u, kk;
    gi = (s - 1) / RADIX_K;
    u  = s - RADIX_K * gi;
    kk = (n - RADIX_K * gi < RADIX_K) ? n - RADIX_K * gi : RADIX_K;
    if (kk == 4) begin
      if (u == 1 || u == 3) return ROT_TRIVIAL;
      if (u == 2)           return ROT_CONST;
      return (s < n) ? ROT_GENERAL : ROT_NONE;
    end
    if (kk == 3) begin
      if (u == 1) return ROT_CONST;     // W8, applied as W16^(2e)
      if (u == 2) return ROT_TRIVIAL;
      return ROT_NONE;
    end
    if (kk == 2 && u == 1) return ROT_TRIVIAL;
    return ROT_NONE;
  endfunction

  // pi * 2^30
  localparam longint PI_Q30 = 64'sd3373259426;

  // round(cos or sin(2*pi*num/2^den_log2) * 2^(cw-1)) for angles in [0, pi/4].
  function automatic longint trig_q(longint num, int den_log2, int cw, bit want_sin);
    longint x, x2, term, sum;
    x  = (PI_Q30 * 2 * num) >>> den_log2;     // angle, Q30
    x2 = (x * x) >>> 30;
    if (want_sin) begin
      term = x;
      sum  = x;
      for (int k = 1; k <= 10; k++) begin
        term = -(((term * x2) >>> 30) / longint'((2*k) * (2*k + 1)));
        sum  = sum + term;
      end
    end else begin
      term = 64'sd1 <<< 30;
      sum  = term;
      for (int k = 1; k <= 10; k++) begin
        term = -(((term * x2) >>> 30) / longint'((2*k - 1) * (2*k)));
        sum  = sum + term;
      end
    end
    return (sum + (64'sd1 <<< (30 - cw))) >>> (31 - cw);
  endfunction

  // Reverse the low n bits of v.
  function automatic logic [31:0] bitrev(logic [31:0] v, int n);
    logic [31:0] r;
    r = '0;
    for (int i = 0; i < n; i++) r[n-1-i] = v[i];
    return r;
  endfunction

endpackage
