// delay_line: fixed delay of D clock cycles for a W-bit word.
//
// The delay buffers of the delay commutators. For D > 1 the buffer is a
// circular memory of D-1 words with one write and one read per cycle at the
// same address, followed by an output register, so it maps onto a simple
// dual-port RAM; D = 1 is a single register. It always shifts (the pipeline
// never stalls) and its contents are not reset: what it holds before the first
// frame is marked invalid by the side-band that travels next to it.
// Timing: dout(t) = din(t - D).
module delay_line #(
  parameter int W = 16,
  parameter int D = 4               // delay in cycles, D >= 1
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic [W-1:0] din,
  output logic [W-1:0] dout
);
  if (D == 1) begin : g_reg
    always_ff @(posedge clk) dout <= din;
  end else begin : g_ram
    localparam int DEPTH = D - 1;
    localparam int AW    = (DEPTH > 1) ? $clog2(DEPTH) : 1;
    logic [W-1:0]  mem [DEPTH];
    logic [AW-1:0] ptr;

    always_ff @(posedge clk or negedge rst_n) begin
      if (!rst_n)                         ptr <= '0;
      else if (ptr == AW'(DEPTH - 1))     ptr <= '0;
      else                                ptr <= ptr + 1'b1;
    end

    always_ff @(posedge clk) begin
      mem[ptr] <= din;
      dout     <= mem[ptr];
    end
  end
endmodule
