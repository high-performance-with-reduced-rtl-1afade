// tb_twiddle_rom: reads all N/8+1 entries of the 4096-point table and compares
// them with cos and sin of 2*pi*i/N scaled by 2^(CW-1) (at most 0.5 LSB off).
module tb_twiddle_rom;
  localparam int N_LOG2 = 12, CW = 16;
  localparam int M = (1 << (N_LOG2 - 3)) + 1;
  logic [N_LOG2-3:0] addr;
  logic [CW-1:0] cos_q, sin_q;
  int checks = 0, failures = 0;

  twiddle_rom #(.N_LOG2(N_LOG2), .CW(CW)) dut (.*);

  initial begin
    real a, ec, es, sc;
    sc = real'(1 << (CW - 1));
    for (int i = 0; i < M; i++) begin
      addr = (N_LOG2-2)'(i);
      #1;
      a  = 2.0 * 3.14159265358979323846 * real'(i) / real'(1 << N_LOG2);
      ec = real'(cos_q) - sc * $cos(a);
      es = real'(sin_q) - sc * $sin(a);
      checks++;
      if (ec > 0.5001 || ec < -0.5001 || es > 0.5001 || es < -0.5001) begin
        failures++;
        if (failures < 10) $display("entry %0d: cos %0d sin %0d", i, cos_q, sin_q);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
