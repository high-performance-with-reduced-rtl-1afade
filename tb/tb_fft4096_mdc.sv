// tb_fft4096_mdc: end-to-end test of the parallel feedforward FFT.
//
// Drives several frames of random complex samples (inside the circle of radius
// 2^(WIN-2)) into the processor and compares every output bin with a
// double-precision DFT computed here. It exercises: back-to-back frames
// (continuous flow), an idle gap between frames, the switch between forward
// and inverse transforms, and a frame with a single tone at full scale. It also
// checks the latency (2*n + N/P - 1 cycles) and that every bin of every frame
// is delivered exactly once. Parameters are reduced (256 points) for speed;
// tb_fft4096_full runs the default size.
module tb_fft4096_mdc;
  localparam int N_LOG2 = 8;
  localparam int P_LOG2 = 3;
  localparam int WIN    = 16;
  localparam int CW     = 16;
  localparam int N      = 1 << N_LOG2;
  localparam int P      = 1 << P_LOG2;
  localparam int T      = N / P;
  localparam int WOUT   = WIN + N_LOG2;
  localparam int NFR    = 6;
  localparam int LAT    = 2*N_LOG2 + T - 1;

  logic clk = 0, rst_n = 0;
  logic in_valid = 0, in_inverse = 0;
  logic signed [WIN-1:0]  in_re [P], in_im [P];
  logic out_valid, out_first, out_inverse;
  logic signed [WOUT-1:0] out_re [P], out_im [P];
  logic [N_LOG2-1:0]      out_bin [P];

  fft4096_mdc #(.N_LOG2(N_LOG2), .P_LOG2(P_LOG2), .WIN(WIN), .CW(CW)) dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  real xr [NFR][N], xi [NFR][N];
  bit  frame_inv [NFR];
  int  gap_before [NFR];
  real ref_r [N], ref_i [N];
  int  seen [N];
  int  n_fwd = 0, n_inv = 0, n_b2b = 0, n_gap = 0, n_switch = 0, n_tone = 0;
  longint in_first_cyc [NFR], out_first_cyc [NFR];
  longint cyc = 0;

  // input-side monitor: cycle of the first sample of each frame
  int in_frames = 0, in_t = 0;
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
    real sr, si, a, sgn;
    sgn = frame_inv[f] ? 1.0 : -1.0;
    for (int k = 0; k < N; k++) begin
      sr = 0.0; si = 0.0;
      for (int m = 0; m < N; m++) begin
        a  = sgn * 2.0 * 3.14159265358979323846 * real'((m * k) % N) / real'(N);
        sr += xr[f][m] * $cos(a) - xi[f][m] * $sin(a);
        si += xr[f][m] * $sin(a) + xi[f][m] * $cos(a);
      end
      ref_r[k] = sr; ref_i[k] = si;
    end
  endtask

  // stimulus
  initial begin
    for (int f = 0; f < NFR; f++) begin
      frame_inv[f]  = (f == 2 || f == 3 || f == 5);
      gap_before[f] = (f == 4) ? 7 : 0;
      for (int m = 0; m < N; m++) begin
        if (f == 1) begin                  // full-scale tone in bin 5
          real a = 2.0 * 3.14159265358979323846 * real'(5 * m) / real'(N);
          xr[f][m] = $floor(32000.0 * $cos(a));
          xi[f][m] = $floor(32000.0 * $sin(a));
        end else begin
          int r, i;
          do begin
            r = int'($urandom_range(32766)) - 16383;
            i = int'($urandom_range(32766)) - 16383;
          end while (r*r + i*i >= 16383*16383);
          xr[f][m] = real'(r); xi[f][m] = real'(i);
        end
      end
    end
    repeat (3) @(posedge clk);
    rst_n <= 1;
    repeat (2) @(posedge clk);
    for (int f = 0; f < NFR; f++) begin
      if (gap_before[f] > 0) begin
        in_valid <= 0;
        repeat (gap_before[f]) @(posedge clk);
        n_gap++;
      end else if (f > 0) n_b2b++;
      if (f > 0 && frame_inv[f] != frame_inv[f-1]) n_switch++;
      for (int t = 0; t < T; t++) begin
        in_valid   <= 1;
        in_inverse <= (t == 0) ? frame_inv[f] : !frame_inv[f];  // only sampled at t = 0
        for (int l = 0; l < P; l++) begin
          in_re[l] <= WIN'(int'(xr[f][in_index(l, t)]));
          in_im[l] <= WIN'(int'(xi[f][in_index(l, t)]));
        end
        @(posedge clk);
      end
    end
    in_valid <= 0;
  end

  // checker
  initial begin
    int f = 0, tcnt = 0;
    real tol, rms, er, ei;
    @(posedge rst_n);
    while (f < NFR) begin
      @(posedge clk);
      if (out_valid) begin
        if (tcnt == 0) begin
          checks++;
          if (!out_first) begin failures++; $display("frame %0d: out_first missing", f); end
          out_first_cyc[f] = cyc;
          checks++;
          if (out_first_cyc[f] - in_first_cyc[f] != LAT) begin
            failures++;
            $display("frame %0d: latency %0d, expected %0d", f, out_first_cyc[f] - in_first_cyc[f], LAT);
          end
          checks++;
          if (out_inverse != frame_inv[f]) begin failures++; $display("frame %0d: inverse flag wrong", f); end
          make_ref(f);
          rms = 0.0;
          for (int k = 0; k < N; k++) rms += ref_r[k]*ref_r[k] + ref_i[k]*ref_i[k];
          rms = $sqrt(rms / N);
          tol = 1.0e-3 * rms + 16.0;
          for (int k = 0; k < N; k++) seen[k] = 0;
        end
        for (int l = 0; l < P; l++) begin
          int k;
          k = int'(out_bin[l]);
          seen[k]++;
          er = real'(out_re[l]) - ref_r[k];
          ei = real'(out_im[l]) - ref_i[k];
          checks++;
          if (er > tol || er < -tol || ei > tol || ei < -tol) begin
            failures++;
            if (failures < 10)
              $display("frame %0d bin %0d: got (%0d,%0d) expected (%0.1f,%0.1f)", f, k,
                       out_re[l], out_im[l], ref_r[k], ref_i[k]);
          end
        end
        tcnt++;
        if (tcnt == T) begin
          for (int k = 0; k < N; k++) begin
            checks++;
            if (seen[k] != 1) begin failures++; $display("frame %0d: bin %0d seen %0d times", f, k, seen[k]); end
          end
          if (frame_inv[f]) n_inv++; else n_fwd++;
          if (f == 1) n_tone++;
          tcnt = 0;
          f++;
        end
      end else if (tcnt != 0) begin
        failures++; checks++;
        $display("frame %0d: output gap inside a frame", f);
      end
    end
    // every mechanism must have happened
    checks += 6;
    if (n_fwd == 0)    begin failures++; $display("no forward frame"); end
    if (n_inv == 0)    begin failures++; $display("no inverse frame"); end
    if (n_b2b == 0)    begin failures++; $display("no back-to-back frames"); end
    if (n_gap == 0)    begin failures++; $display("no idle gap"); end
    if (n_switch == 0) begin failures++; $display("no FFT/IFFT switch"); end
    if (n_tone == 0)   begin failures++; $display("no full-scale tone"); end
    $display("forward=%0d inverse=%0d back_to_back=%0d gaps=%0d switches=%0d tone=%0d",
             n_fwd, n_inv, n_b2b, n_gap, n_switch, n_tone);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (NFR * T * 4 + 2000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
