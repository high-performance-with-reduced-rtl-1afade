// tb_fft4096_full: the processor at its default size (4096 points, 8 samples
// per cycle) taking two back-to-back frames, a forward transform of random
// data followed by an inverse transform of other random data. Each of the
// 2 x 4096 outputs is compared with a double-precision DFT computed here, the
// first-output latency (2*12 + 512 - 1 = 535 cycles) is checked, and every bin
// must be delivered exactly once.
module tb_fft4096_full;
  localparam int N_LOG2 = 12;
  localparam int P_LOG2 = 3;
  localparam int WIN    = 16;
  localparam int N      = 1 << N_LOG2;
  localparam int P      = 1 << P_LOG2;
  localparam int T      = N / P;
  localparam int WOUT   = WIN + N_LOG2;
  localparam int NFR    = 2;
  localparam int LAT    = 2*N_LOG2 + T - 1;

  logic clk = 0, rst_n = 0;
  logic in_valid = 0, in_inverse = 0;
  logic signed [WIN-1:0]  in_re [P], in_im [P];
  logic out_valid, out_first, out_inverse;
  logic signed [WOUT-1:0] out_re [P], out_im [P];
  logic [N_LOG2-1:0]      out_bin [P];

  fft4096_mdc dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  real xr [NFR][N], xi [NFR][N];
  real cs [N], sn [N];
  bit  frame_inv [NFR];
  real ref_r [N], ref_i [N];
  int  seen [N];
  longint in_first_cyc [NFR];
  longint cyc = 0;
  int in_frames = 0, in_t = 0;
  int n_fwd = 0, n_inv = 0;

  always @(posedge clk) begin
    cyc <= cyc + 1;
    if (in_valid) begin
      if (in_t == 0) begin in_first_cyc[in_frames] = cyc; in_frames++; end
      in_t = (in_t + 1) % T;
    end
  end

  function automatic int in_index(int lane, int t);
    int b = 0;
    for (int q = 0; q < P_LOG2; q++) b |= ((lane >> q) & 1) << (P_LOG2 - 1 - q);
    return b * T + t;
  endfunction

  task automatic make_ref(int f);
    real sr, si, sgn;
    int  a;
    sgn = frame_inv[f] ? 1.0 : -1.0;
    for (int k = 0; k < N; k++) begin
      sr = 0.0; si = 0.0;
      for (int m = 0; m < N; m++) begin
        a  = (m * k) % N;
        sr += xr[f][m] * cs[a] - sgn * xi[f][m] * sn[a];
        si += sgn * xr[f][m] * sn[a] + xi[f][m] * cs[a];
      end
      ref_r[k] = sr; ref_i[k] = si;
    end
  endtask

  initial begin
    int r, i;
    for (int m = 0; m < N; m++) begin
      cs[m] = $cos(2.0 * 3.14159265358979323846 * real'(m) / real'(N));
      sn[m] = $sin(2.0 * 3.14159265358979323846 * real'(m) / real'(N));
    end
    for (int f = 0; f < NFR; f++) begin
      frame_inv[f] = (f == 1);
      for (int m = 0; m < N; m++) begin
        do begin
          r = int'($urandom_range(32766)) - 16383;
          i = int'($urandom_range(32766)) - 16383;
        end while (r*r + i*i >= 16383*16383);
        xr[f][m] = real'(r); xi[f][m] = real'(i);
      end
    end
    repeat (3) @(posedge clk);
    rst_n <= 1;
    repeat (2) @(posedge clk);
    for (int f = 0; f < NFR; f++) begin
      for (int t = 0; t < T; t++) begin
        in_valid   <= 1;
        in_inverse <= frame_inv[f];
        for (int l = 0; l < P; l++) begin
          in_re[l] <= WIN'(int'(xr[f][in_index(l, t)]));
          in_im[l] <= WIN'(int'(xi[f][in_index(l, t)]));
        end
        @(posedge clk);
      end
    end
    in_valid <= 0;
  end

  initial begin
    int f, tcnt, k;
    real tol, rms, er, ei, maxe;
    f = 0; tcnt = 0;
    @(posedge rst_n);
    while (f < NFR) begin
      @(posedge clk);
      if (out_valid) begin
        if (tcnt == 0) begin
          checks += 3;
          if (!out_first) begin failures++; $display("frame %0d: out_first missing", f); end
          if (cyc - in_first_cyc[f] != LAT) begin
            failures++;
            $display("frame %0d: latency %0d, expected %0d", f, cyc - in_first_cyc[f], LAT);
          end
          if (out_inverse != frame_inv[f]) begin failures++; $display("frame %0d: inverse flag wrong", f); end
          make_ref(f);
          rms = 0.0;
          for (int q = 0; q < N; q++) rms += ref_r[q]*ref_r[q] + ref_i[q]*ref_i[q];
          rms  = $sqrt(rms / N);
          tol  = 1.0e-3 * rms + 16.0;
          maxe = 0.0;
          for (int q = 0; q < N; q++) seen[q] = 0;
        end
        for (int l = 0; l < P; l++) begin
          k = int'(out_bin[l]);
          seen[k]++;
          er = real'(out_re[l]) - ref_r[k];
          ei = real'(out_im[l]) - ref_i[k];
          if (er < 0) er = -er;
          if (ei < 0) ei = -ei;
          if (er > maxe) maxe = er;
          if (ei > maxe) maxe = ei;
          checks++;
          if (er > tol || ei > tol) begin
            failures++;
            if (failures < 10)
              $display("frame %0d bin %0d: got (%0d,%0d) expected (%0.1f,%0.1f)", f, k,
                       out_re[l], out_im[l], ref_r[k], ref_i[k]);
          end
        end
        tcnt++;
        if (tcnt == T) begin
          for (int q = 0; q < N; q++) begin
            checks++;
            if (seen[q] != 1) failures++;
          end
          $display("frame %0d (%s): max error %0.1f LSB, rms output %0.1f",
                   f, frame_inv[f] ? "inverse" : "forward", maxe, rms);
          if (frame_inv[f]) n_inv++; else n_fwd++;
          tcnt = 0;
          f++;
        end
      end
    end
    checks += 2;
    if (n_fwd == 0) failures++;
    if (n_inv == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (NFR * T * 3 + 2000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
