// pcsb_addr_decoder: address decoder of the PC slot buffer card.
//
// The card owns the reserved PC I/O window 300H-31FH. An address belongs to
// it when A9..A0 = 11_000X_XXXX: A9 and A8 high, A7, A6 and A5 low. Inside
// the window A4..A3 pick one of four eight-address ranges (300H-307H,
// 308H-30FH, 310H-317H, 318H-31FH), as a 74LS138 one-of-eight decoder does
// with two gated enables built from 74LS00 NAND gates; here that gate network
// is written as its Boolean function. all_sel covers the whole window (the
// "all 16-address range") and is high whenever one of the enabled ranges is
// hit. Each range can be switched off with range_en, so that software can
// leave ranges to other equipment.
//
// Purely combinational, like the TTL parts it replaces. The window and the
// range split follow the system description; the per-range enable being an
// input port is this design's choice.
module pcsb_addr_decoder #(
  parameter logic [9:0] BASE_ADDR = cus_pkg::BASE_ADDR
) (
  input  logic [9:0] addr,       // PC address A9..A0
  input  logic [3:0] range_en,   // 1 = range answers
  output logic [3:0] range_sel,  // one-hot range hit
  output logic       all_sel     // hit anywhere in the enabled window
);

  logic       g1;       // 74LS138 G1: A9 and A8 both high
  logic       g2_n;     // 74LS138 G2A/G2B: any of A7..A5 high blocks it
  logic [7:0] y_n;      // 74LS138 outputs, active low

  always_comb begin
    g1   = (addr[9] == BASE_ADDR[9]) && (addr[8] == BASE_ADDR[8]);
    g2_n = (addr[7:5] != BASE_ADDR[7:5]);
    y_n  = '1;
    if (g1 && !g2_n)
      y_n[{1'b0, addr[4:3]}] = 1'b0;
  end

  assign range_sel = ~y_n[3:0] & range_en;
  assign all_sel   = |range_sel;

endmodule
