// gal_port_ctrl: logic of the second GAL16V8, which selects the two digital
// port chips: the 8255 (three 8-bit parallel ports) and the 8253 (three 8-bit
// down counters used as serial ports).
//
// Inside the decoded range 300H-307H, A2 picks the chip: 300H-303H is the
// 8255 (port A, port B, port C, control register) and 304H-307H the 8253
// (counter 0, 1, 2, control register); A1..A0 go to both chips straight from
// the buffered address bus. Chip selects follow the address alone, as the
// chips expect; the read and write strobes are passed on only while one of
// the two is selected. ppi_rd/pit_rd tell the card which chip the PC is
// reading, so that its 8-bit data is put on D7..D0.
//
// Combinational. That the GALs make these chip selects follows the system
// description; the address split is this design's choice.
module gal_port_ctrl (
  input  logic       port_range_sel,  // 300H-307H decoded
  input  logic [2:0] addr,            // A2..A0
  input  logic       ior_n,           // buffered, card-gated
  input  logic       iow_n,
  output logic       ppi_cs_n,
  output logic       pit_cs_n,
  output logic       dev_rd_n,
  output logic       dev_wr_n,
  output logic       ppi_rd,
  output logic       pit_rd
);

  always_comb begin
    ppi_cs_n = !(port_range_sel && !addr[2]);
    pit_cs_n = !(port_range_sel &&  addr[2]);
    dev_rd_n = !(port_range_sel && !ior_n);
    dev_wr_n = !(port_range_sel && !iow_n);
    ppi_rd   = !ppi_cs_n && !dev_rd_n;
    pit_rd   = !pit_cs_n && !dev_rd_n;
  end

endmodule
