// gal_analog_ctrl: logic of the first GAL16V8, which runs the analog side of
// the card: the ADS774 converter, the MPC508 input multiplexer, the input
// range relay K1 and the two DAC8012 converters.
//
// It sees the decoded ADC range (308H-30FH) and DAC range (310H-317H), the
// low address bits and the buffered strobes, and turns PC cycles into chip
// cycles:
//   write 30BH  start: CE=1, CS=0, R/C=0, A0=0 (12-bit conversion) for the
//               length of the write strobe. Ignored while STS shows the
//               converter busy.
//   read  308H  data: CE=1, CS=0, R/C=1, A0=0, all 12 bits at once.
//   read  309H  status: the PC sees STS on D0.
//   write 30AH  channel register: D2..D0 multiplexer address, D3 enable.
//   write 30CH  sensitivity register: D0 drives relay K1 (1 = +/-10 V range).
//   310H/311H   DAC 0/1 select, R/W low on a write and high on a read back.
// The channel and sensitivity registers are the GAL's registered outputs,
// loaded on the clk edge while their write strobe is low; reset clears them
// (multiplexer off, +/-5 V range), like the GAL's power-on reset. All other
// outputs are combinational. rd_src tells the card which source to put on the
// PC bus during a read.
//
// The controlled pins and the 12-bit conversion follow the system
// description; the register offsets, bit positions and the busy interlock are
// this design's choice.
module gal_analog_ctrl
  import cus_pkg::*;
#(
  parameter int unsigned NDAC = cus_pkg::NUM_DAC
) (
  input  logic            clk,
  input  logic            rst_n,
  input  logic            adc_range_sel,
  input  logic            dac_range_sel,
  input  logic [2:0]      addr,        // A2..A0
  input  logic            ior_n,       // buffered, card-gated
  input  logic            iow_n,
  input  logic [3:0]      d_wr,        // D3..D0 of a PC write
  // ADS774
  output logic            adc_cs_n,
  output logic            adc_a0,
  output logic            adc_rc,
  output logic            adc_ce,
  input  logic            adc_sts,     // high while converting
  // MPC508 and relay
  output logic [2:0]      mux_a,
  output logic            mux_en,
  output logic            relay_k1,
  // DAC8012 pair
  output logic [NDAC-1:0] dac_cs_n,
  output logic            dac_rw,
  // read source for the PC bus
  output rd_src_e         rd_src
);

  logic rd, wr;
  logic adc_start, adc_read, adc_stat, chan_wr, sens_wr;

  always_comb begin
    rd        = !ior_n;
    wr        = !iow_n;
    adc_start = adc_range_sel && wr && (addr == ADC_OFS_START) && !adc_sts;
    adc_read  = adc_range_sel && rd && (addr == ADC_OFS_DATA);
    adc_stat  = adc_range_sel && rd && (addr == ADC_OFS_STATUS);
    chan_wr   = adc_range_sel && wr && (addr == ADC_OFS_CHAN);
    sens_wr   = adc_range_sel && wr && (addr == ADC_OFS_SENS);

    adc_ce   = adc_start || adc_read;
    adc_cs_n = !(adc_start || adc_read);
    adc_rc   = !adc_start;
    adc_a0   = 1'b0;

    dac_cs_n = '1;
    for (int i = 0; i < NDAC; i++)
      if (dac_range_sel && (rd || wr) && (addr == 3'(i)))
        dac_cs_n[i] = 1'b0;
    dac_rw = !wr;

    if (adc_read)                                  rd_src = RD_ADC_DATA;
    else if (adc_stat)                             rd_src = RD_ADC_STATUS;
    else if (dac_range_sel && rd && !(&dac_cs_n))  rd_src = RD_DAC;
    else                                           rd_src = RD_NONE;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      mux_a    <= '0;
      mux_en   <= 1'b0;
      relay_k1 <= 1'b0;
    end else begin
      if (chan_wr) begin
        mux_a  <= d_wr[2:0];
        mux_en <= d_wr[3];
      end
      if (sens_wr) relay_k1 <= d_wr[0];
    end
  end

  assert property (@(posedge clk) disable iff (!rst_n) !(adc_start && adc_read))
    else $error("ADC start and read at the same time");

endmodule
