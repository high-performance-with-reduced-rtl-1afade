// fft_config_harness: drives one fft4096_mdc instance of a given size and
// parallelism with NFR back-to-back frames (forward, inverse, forward, ...)
// of random data inside the circle of radius 2^(WIN-2), compares every bin
// with a double-precision DFT, checks the latency 2*n + N/P - 1 and that
// each bin appears exactly once per frame. Reports its counts on ports.
module fft_config_harness #(
  parameter int N_LOG2 = 6,
  parameter int P_LOG2 = 3,
  parameter int NFR    = 2
) (
  input  logic clk,
  input  logic rst_n,
  output int   checks,
  output int   failures,
  output logic done
);
  localparam int WIN  = 16;
  localparam int N    = 1 << N_LOG2;
  localparam int P    = 1 << P_LOG2;
  localparam int T    = N / P;
  localparam int WOUT = WIN + N_LOG2;
  localparam int LAT  = 2*N_LOG2 + T - 1;
  localparam real PI  = 3.14159265358979323846;

  logic in_valid, in_inverse;
  logic signed [WIN-1:0]  in_re [P], in_im [P];
  logic out_valid, out_first, out_inverse;
  logic signed [WOUT-1:0] out_re [P], out_im [P];
  logic [N_LOG2-1:0]      out_bin [P];

  fft4096_mdc #(.N_LOG2(N_LOG2), .P_LOG2(P_LOG2)) dut (.*);

  real xr [NFR][N], xi [NFR][N];
  real cs [N], sn [N];
  real ref_r [N], ref_i [N];
  int  seen [N];
  longint cyc, in_first_cyc [NFR];
  int in_frames, in_t;

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

  initial begin
    int r, i;
    cyc = 0; in_frames = 0; in_t = 0;
    in_valid = 0; in_inverse = 0;
    for (int m = 0; m < N; m++) begin
      cs[m] = $cos(2.0 * PI * real'(m) / real'(N));
      sn[m] = $sin(2.0 * PI * real'(m) / real'(N));
    end
    for (int f = 0; f < NFR; f++)
      for (int m = 0; m < N; m++) begin
        do begin
          r = int'($urandom_range(32766)) - 16383;
          i = int'($urandom_range(32766)) - 16383;
        end while (r*r + i*i >= 16383*16383);
        xr[f][m] = real'(r); xi[f][m] = real'(i);
      end
    @(posedge rst_n);
    @(posedge clk);
    for (int f = 0; f < NFR; f++)
      for (int t = 0; t < T; t++) begin
        in_valid   <= 1;
        in_inverse <= f[0];
        for (int l = 0; l < P; l++) begin
          in_re[l] <= WIN'(int'(xr[f][in_index(l, t)]));
          in_im[l] <= WIN'(int'(xi[f][in_index(l, t)]));
        end
        @(posedge clk);
      end
    in_valid <= 0;
  end

  initial begin
    int f, tcnt, k, a;
    real tol, rms, er, ei, sgn, sr, si;
    checks = 0; failures = 0; done = 0;
    f = 0; tcnt = 0;
    @(posedge rst_n);
    while (f < NFR) begin
      @(posedge clk);
      if (out_valid) begin
        if (tcnt == 0) begin
          checks += 3;
          if (!out_first) failures++;
          if (cyc - in_first_cyc[f] != LAT) begin
            failures++;
            $display("N=%0d P=%0d frame %0d: latency %0d, expected %0d", N, P, f, cyc - in_first_cyc[f], LAT);
          end
          if (out_inverse != f[0]) failures++;
          sgn = f[0] ? 1.0 : -1.0;
          rms = 0.0;
          for (int q = 0; q < N; q++) begin
            sr = 0.0; si = 0.0;
            for (int m = 0; m < N; m++) begin
              a  = (m * q) % N;
              sr += xr[f][m] * cs[a] - sgn * xi[f][m] * sn[a];
              si += sgn * xr[f][m] * sn[a] + xi[f][m] * cs[a];
            end
            ref_r[q] = sr; ref_i[q] = si;
            rms += sr*sr + si*si;
            seen[q] = 0;
          end
          rms = $sqrt(rms / N);
          tol = 1.0e-3 * rms + 16.0;
        end
        for (int l = 0; l < P; l++) begin
          k = int'(out_bin[l]);
          seen[k]++;
          er = real'(out_re[l]) - ref_r[k];
          ei = real'(out_im[l]) - ref_i[k];
          checks++;
          if (er > tol || er < -tol || ei > tol || ei < -tol) begin
            failures++;
            if (failures < 5)
              $display("N=%0d P=%0d frame %0d bin %0d: got (%0d,%0d) expected (%0.1f,%0.1f)",
                       N, P, f, k, out_re[l], out_im[l], ref_r[k], ref_i[k]);
          end
        end
        tcnt++;
        if (tcnt == T) begin
          for (int q = 0; q < N; q++) begin
            checks++;
            if (seen[q] != 1) failures++;
          end
          tcnt = 0;
          f++;
        end
      end
    end
    $display("N=%0d P=%0d: %0d checks, %0d failures", N, P, checks, failures);
    done = 1;
  end
endmodule
