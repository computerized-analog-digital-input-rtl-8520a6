// cus_top: card logic of the computerized analog/digital input/output
// universal system.
//
// A PC reaches a box of converters and digital ports through its 16-bit I/O
// slot. This module is the digital logic between the two: the PC slot buffer
// card (address decoder, three-state bus buffer, byte and serial word
// buffers) and the two GAL16V8 decoders that drive the ADS774 12-bit ADC, the
// MPC508 eight-channel input multiplexer, the input range relay, two DAC8012
// 12-bit DACs, an 8255 parallel port chip and an 8253 counter chip. Those
// chips are bought-in parts; their pins are this module's device-side ports.
//
// Every PC cycle to 300H-31FH is decoded into one of four ranges (see
// cus_pkg for the map). The buffer passes the strobes on only for the card's
// addresses; the GAL logic turns them into chip cycles; on a read the source
// chosen by the GAL logic or by the word-buffer range is returned through the
// buffer on the PC data bus. 8-bit chips use D7..D0. Bytes from byte_in are
// paired into 16-bit words and serial bits from ser_data are gathered into
// 16-bit words, each read with one PC access at 318H/319H; 31AH returns their
// status: D0 byte word ready, D1 byte overrun, D2 serial word ready, D3
// serial overrun.
//
// Timing: PC strobes are taken as levels in the clk domain; decode and data
// paths are combinational, the registers (channel, sensitivity, word
// buffers) load on clk. The overall structure follows the system
// description; the register map, the clocking and the word-buffer interface
// are this design's choices.
module cus_top
  import cus_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  // PC slot
  input  logic [9:0]  pc_addr,
  input  logic        pc_ior_n,
  input  logic        pc_iow_n,
  input  logic [15:0] pc_d_wr,
  output logic [15:0] pc_d_rd,
  output logic        pc_d_oe,
  output logic        pc_irq3,
  output logic        pc_irq5,
  input  logic [3:0]  range_en,
  // device-side bus
  output logic [15:0] sys_d,
  output logic        sys_d_oe,
  output logic [1:0]  sys_a,
  input  logic        sys_irq3,
  input  logic        sys_irq5,
  // ADS774
  output logic        adc_cs_n,
  output logic        adc_a0,
  output logic        adc_rc,
  output logic        adc_ce,
  input  logic        adc_sts,
  input  logic [ADC_BITS-1:0] adc_d,
  // MPC508 and range relay
  output logic [2:0]  mux_a,
  output logic        mux_en,
  output logic        relay_k1,
  // DAC8012 pair
  output logic [NUM_DAC-1:0] dac_cs_n,
  output logic        dac_rw,
  input  logic [DAC_BITS-1:0] dac_d_rd,
  // 8255 and 8253
  output logic        ppi_cs_n,
  output logic        pit_cs_n,
  output logic        dev_rd_n,
  output logic        dev_wr_n,
  input  logic [7:0]  ppi_d_rd,
  input  logic [7:0]  pit_d_rd,
  // word-buffer inputs
  input  logic [7:0]  byte_in,
  input  logic        byte_stb,
  input  logic        ser_clk,
  input  logic        ser_data
);

  logic [3:0]  range_sel;
  logic        card_sel;
  logic [9:0]  sys_addr;
  logic        sys_ior_n, sys_iow_n;
  logic [15:0] sys_d_rd;
  rd_src_e     an_rd_src;
  logic        ppi_rd, pit_rd;
  logic        buf_rd_byte, buf_rd_ser, buf_rd_stat;
  logic [15:0] byte_word, ser_word;
  logic        byte_ready, byte_ovr, ser_ready, ser_ovr;
  rd_src_e     rd_src;

  pcsb_addr_decoder u_dec (
    .addr(pc_addr), .range_en, .range_sel, .all_sel(card_sel)
  );

  pcsb_bus_buffer u_buf (
    .card_sel, .pc_addr, .pc_ior_n, .pc_iow_n, .pc_d_wr, .pc_d_rd, .pc_d_oe,
    .pc_irq3, .pc_irq5,
    .sys_addr, .sys_ior_n, .sys_iow_n, .sys_d_wr(sys_d), .sys_d_oe,
    .sys_d_rd, .sys_irq3, .sys_irq5
  );

  gal_analog_ctrl u_gal_an (
    .clk, .rst_n,
    .adc_range_sel(range_sel[RANGE_ADC]), .dac_range_sel(range_sel[RANGE_DAC]),
    .addr(sys_addr[2:0]), .ior_n(sys_ior_n), .iow_n(sys_iow_n), .d_wr(sys_d[3:0]),
    .adc_cs_n, .adc_a0, .adc_rc, .adc_ce, .adc_sts,
    .mux_a, .mux_en, .relay_k1, .dac_cs_n, .dac_rw, .rd_src(an_rd_src)
  );

  gal_port_ctrl u_gal_port (
    .port_range_sel(range_sel[RANGE_PORTS]), .addr(sys_addr[2:0]),
    .ior_n(sys_ior_n), .iow_n(sys_iow_n),
    .ppi_cs_n, .pit_cs_n, .dev_rd_n, .dev_wr_n, .ppi_rd, .pit_rd
  );

  always_comb begin
    buf_rd_byte = range_sel[RANGE_BUF] && !sys_ior_n && (sys_addr[2:0] == BUF_OFS_BYTE);
    buf_rd_ser  = range_sel[RANGE_BUF] && !sys_ior_n && (sys_addr[2:0] == BUF_OFS_SER);
    buf_rd_stat = range_sel[RANGE_BUF] && !sys_ior_n && (sys_addr[2:0] == BUF_OFS_STATUS);
  end

  pcsb_byte_packer u_bytes (
    .clk, .rst_n, .byte_in, .byte_stb, .rd_word(buf_rd_byte),
    .word(byte_word), .ready(byte_ready), .overrun(byte_ovr)
  );

  pcsb_serial_packer #(.WORD_BITS(16)) u_serial (
    .clk, .rst_n, .ser_clk, .ser_data, .rd_word(buf_rd_ser),
    .word(ser_word), .ready(ser_ready), .overrun(ser_ovr)
  );

  // Device-side read bus: the one source selected drives it.
  always_comb begin
    if (an_rd_src != RD_NONE) rd_src = an_rd_src;
    else if (ppi_rd)          rd_src = RD_PPI;
    else if (pit_rd)          rd_src = RD_PIT;
    else if (buf_rd_byte)     rd_src = RD_BUF_BYTE;
    else if (buf_rd_ser)      rd_src = RD_BUF_SER;
    else if (buf_rd_stat)     rd_src = RD_BUF_STATUS;
    else                      rd_src = RD_NONE;

    case (rd_src)
      RD_ADC_DATA:   sys_d_rd = 16'(adc_d);
      RD_ADC_STATUS: sys_d_rd = {15'd0, adc_sts};
      RD_DAC:        sys_d_rd = 16'(dac_d_rd);
      RD_PPI:        sys_d_rd = {8'd0, ppi_d_rd};
      RD_PIT:        sys_d_rd = {8'd0, pit_d_rd};
      RD_BUF_BYTE:   sys_d_rd = byte_word;
      RD_BUF_SER:    sys_d_rd = ser_word;
      RD_BUF_STATUS: sys_d_rd = {12'd0, ser_ovr, ser_ready, byte_ovr, byte_ready};
      default:       sys_d_rd = '0;
    endcase
  end

  assign sys_a = sys_addr[1:0];

  // At most one source may drive the device read bus.
  assert property (@(posedge clk) disable iff (!rst_n)
    $onehot0({an_rd_src != RD_NONE, ppi_rd, pit_rd, buf_rd_byte, buf_rd_ser, buf_rd_stat}))
    else $error("several sources selected for one PC read");

endmodule
