// cus_pkg: constants and types shared by the CUS card logic.
//
// The card answers to the reserved PC I/O window 300H-31FH, cut into four
// eight-address ranges. Which device sits in which range, and the register
// offsets inside each range, are this design's own map:
//   300H-303H  8255 port A, port B, port C, control register
//   304H-307H  8253 counter 0, counter 1, counter 2, control register
//   308H       ADC data (read, 12 bits on D11..D0)
//   309H       ADC status (read, STS on D0)
//   30AH       multiplexer channel (write, D2..D0 channel, D3 enable)
//   30BH       ADC start conversion (write, data ignored)
//   30CH       input sensitivity (write, D0 = relay K1)
//   310H/311H  DAC 0 / DAC 1 data (write, read back, D11..D0)
//   318H       word built from two device bytes (read)
//   319H       word built from 16 serial bits (read)
//   31AH       word-buffer status (read)
// The window itself, the 12-bit converters and the count of two DACs follow
// the system description.
package cus_pkg;

  localparam logic [9:0] BASE_ADDR = 10'h300;
  localparam int unsigned ADC_BITS = 12;
  localparam int unsigned DAC_BITS = 12;
  localparam int unsigned NUM_DAC  = 2;

  // Range numbers (A4..A3 inside the window).
  localparam logic [1:0] RANGE_PORTS = 2'd0;  // 300H-307H
  localparam logic [1:0] RANGE_ADC   = 2'd1;  // 308H-30FH
  localparam logic [1:0] RANGE_DAC   = 2'd2;  // 310H-317H
  localparam logic [1:0] RANGE_BUF   = 2'd3;  // 318H-31FH

  // Offsets (A2..A0) inside the ADC range.
  localparam logic [2:0] ADC_OFS_DATA   = 3'd0;
  localparam logic [2:0] ADC_OFS_STATUS = 3'd1;
  localparam logic [2:0] ADC_OFS_CHAN   = 3'd2;
  localparam logic [2:0] ADC_OFS_START  = 3'd3;
  localparam logic [2:0] ADC_OFS_SENS   = 3'd4;

  // Offsets inside the word-buffer range.
  localparam logic [2:0] BUF_OFS_BYTE   = 3'd0;
  localparam logic [2:0] BUF_OFS_SER    = 3'd1;
  localparam logic [2:0] BUF_OFS_STATUS = 3'd2;

  // Absolute addresses, for testbenches and software.
  localparam logic [9:0] A_PPI_A     = 10'h300;
  localparam logic [9:0] A_PPI_B     = 10'h301;
  localparam logic [9:0] A_PPI_C     = 10'h302;
  localparam logic [9:0] A_PPI_CTRL  = 10'h303;
  localparam logic [9:0] A_PIT_C0    = 10'h304;
  localparam logic [9:0] A_PIT_CTRL  = 10'h307;
  localparam logic [9:0] A_ADC_DATA  = 10'h308;
  localparam logic [9:0] A_ADC_STAT  = 10'h309;
  localparam logic [9:0] A_ADC_CHAN  = 10'h30A;
  localparam logic [9:0] A_ADC_START = 10'h30B;
  localparam logic [9:0] A_ADC_SENS  = 10'h30C;
  localparam logic [9:0] A_DAC0      = 10'h310;
  localparam logic [9:0] A_DAC1      = 10'h311;
  localparam logic [9:0] A_BUF_BYTE  = 10'h318;
  localparam logic [9:0] A_BUF_SER   = 10'h319;
  localparam logic [9:0] A_BUF_STAT  = 10'h31A;

  // Source of the data the card returns on a PC read.
  typedef enum logic [3:0] {
    RD_NONE,
    RD_ADC_DATA,
    RD_ADC_STATUS,
    RD_DAC,
    RD_PPI,
    RD_PIT,
    RD_BUF_BYTE,
    RD_BUF_SER,
    RD_BUF_STATUS
  } rd_src_e;

endpackage
