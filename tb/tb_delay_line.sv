// tb_delay_line: random words through delay lines of depth 1, 2 and 7; each
// output must equal the input of exactly D cycles earlier.
module tb_delay_line;
  localparam int W = 12;
  logic clk = 0, rst_n = 0;
  logic [W-1:0] din, dout1, dout2, dout7;
  logic [W-1:0] hist [64];
  int checks = 0, failures = 0;

  delay_line #(.W(W), .D(1)) dut1 (.clk, .rst_n, .din, .dout(dout1));
  delay_line #(.W(W), .D(2)) dut2 (.clk, .rst_n, .din, .dout(dout2));
  delay_line #(.W(W), .D(7)) dut7 (.clk, .rst_n, .din, .dout(dout7));

  always #5 clk = ~clk;

  initial begin
    din = '0;
    repeat (2) @(posedge clk);
    rst_n <= 1;
    @(posedge clk);
    #1;
    for (int c = 0; c < 500; c++) begin
      din = W'($urandom);
      hist[c % 64] = din;          // value in front of edge c
      @(posedge clk);
      #1;
      // after edge c a delay of D shows the value that was in front of edge c-D+1
      if (c >= 8) begin
        checks += 3;
        if (dout1 != hist[c % 64])       begin failures++; $display("D=1 cycle %0d", c); end
        if (dout2 != hist[(c - 1) % 64]) begin failures++; $display("D=2 cycle %0d", c); end
        if (dout7 != hist[(c - 6) % 64]) begin failures++; $display("D=7 cycle %0d", c); end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
