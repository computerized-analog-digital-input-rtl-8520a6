// dac8012_model: behavioural model of the data latch of N DAC8012 12-bit
// DACs sharing one bus, for testbenches only. While a chip's CS is low with
// R/W low its latch follows the bus; with R/W high the latch is driven back
// onto the bus (read back). The analog output is represented by the latch
// value itself.
module dac8012_model #(
  parameter int unsigned N = 2
) (
  input  logic         clk,
  input  logic [N-1:0] cs_n,
  input  logic         rw,
  input  logic [11:0]  d_in,
  output logic [11:0]  d_out,
  output logic [11:0]  latch [N]
);
  initial foreach (latch[i]) latch[i] = '0;

  always @(posedge clk)
    for (int i = 0; i < N; i++)
      if (!cs_n[i] && !rw) latch[i] <= d_in;

  always_comb begin
    d_out = '0;
    for (int i = 0; i < N; i++)
      if (!cs_n[i] && rw) d_out = latch[i];
  end
endmodule
