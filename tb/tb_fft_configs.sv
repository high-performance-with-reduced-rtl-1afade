// tb_fft_configs: the processor in the other sizes and parallelisms the
// radix-2^4 feedforward architecture is described for: 64 points with 2, 4
// and 8 lanes (the size of the architecture diagrams), 128 points with 8 lanes
// (a last group of three stages), 2048 points with 8 lanes (the largest
// IEEE 802.16e size) and 4096 points with 4 lanes. Each instance runs a forward
// and an inverse frame and is checked against a double-precision DFT.
module tb_fft_configs;
  localparam int NI = 6;
  logic clk = 0, rst_n = 0;
  int   c [NI], f [NI];
  logic d [NI];
  int   checks, failures;

  always #5 clk = ~clk;

  fft_config_harness #(.N_LOG2(6),  .P_LOG2(1)) h0 (.clk, .rst_n, .checks(c[0]), .failures(f[0]), .done(d[0]));
  fft_config_harness #(.N_LOG2(6),  .P_LOG2(2)) h1 (.clk, .rst_n, .checks(c[1]), .failures(f[1]), .done(d[1]));
  fft_config_harness #(.N_LOG2(6),  .P_LOG2(3)) h2 (.clk, .rst_n, .checks(c[2]), .failures(f[2]), .done(d[2]));
  fft_config_harness #(.N_LOG2(7),  .P_LOG2(3)) h3 (.clk, .rst_n, .checks(c[3]), .failures(f[3]), .done(d[3]));
  fft_config_harness #(.N_LOG2(11), .P_LOG2(3)) h4 (.clk, .rst_n, .checks(c[4]), .failures(f[4]), .done(d[4]));
  fft_config_harness #(.N_LOG2(12), .P_LOG2(2)) h5 (.clk, .rst_n, .checks(c[5]), .failures(f[5]), .done(d[5]));

  initial begin
    int all;
    repeat (3) @(posedge clk);
    rst_n <= 1;
    do begin
      @(posedge clk);
      all = 1;
      for (int i = 0; i < NI; i++) all &= int'(d[i]);
    end while (!all);
    checks = 0; failures = 0;
    for (int i = 0; i < NI; i++) begin checks += c[i]; failures += f[i]; end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    checks = 0; failures = 1;
    for (int i = 0; i < NI; i++) begin checks += c[i]; failures += f[i]; end
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
