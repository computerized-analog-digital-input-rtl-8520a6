// port_chip_model: register-level stand-in for an 8255 or 8253 as seen from
// the bus, for testbenches only. Four byte registers addressed by A1..A0 are
// written while CS and WR are low and read back while CS and RD are low.
// Neither the port pins nor the counting of the real chips is modelled.
module port_chip_model (
  input  logic       clk,
  input  logic       cs_n,
  input  logic       rd_n,
  input  logic       wr_n,
  input  logic [1:0] a,
  input  logic [7:0] d_in,
  output logic [7:0] d_out,
  output int         writes,
  output int         reads
);
  logic [7:0] regs [4];
  logic       rd_q = 1'b0;
  initial begin foreach (regs[i]) regs[i] = '0; writes = 0; reads = 0; end

  always @(posedge clk) begin
    rd_q <= !cs_n && !rd_n;
    if (!cs_n && !wr_n) begin
      regs[a] <= d_in;
      writes  <= writes + 1;
    end
    if (!cs_n && !rd_n && !rd_q) reads <= reads + 1;
  end
  assign d_out = (!cs_n && !rd_n) ? regs[a] : '0;
endmodule
