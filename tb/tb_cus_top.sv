// tb_cus_top: end-to-end test of the card logic with its default parameters.
//
// The testbench plays the PC: it performs I/O read and write cycles on the
// slot signals. Behavioural models stand for the ADS774 converter, the two
// DAC8012s and the 8255/8253 port chips; eight analog input voltages (in mV)
// feed the converter model through the multiplexer address and the range
// relay chosen by the card. The run covers: a conversion on every channel in
// both input ranges with status polling and a check of the conversion time,
// a start while busy, DAC write and read back, 8255 and 8253 register access,
// byte and serial word buffering with and without overrun, the interrupt
// lines, a disabled range and addresses outside the window. Each of those
// mechanisms is counted, and one that never happened is a failure.
module tb_cus_top;
  import cus_pkg::*;

  localparam int CONV_CYCLES = 68;

  logic        clk = 0, rst_n = 0;
  logic [9:0]  pc_addr = 0;
  logic        pc_ior_n = 1, pc_iow_n = 1;
  logic [15:0] pc_d_wr = 0, pc_d_rd;
  logic        pc_d_oe, pc_irq3, pc_irq5;
  logic [3:0]  range_en = 4'hF;
  logic [15:0] sys_d;
  logic        sys_d_oe;
  logic [1:0]  sys_a;
  logic        sys_irq3 = 0, sys_irq5 = 0;
  logic        adc_cs_n, adc_a0, adc_rc, adc_ce, adc_sts;
  logic [11:0] adc_d;
  logic [2:0]  mux_a;
  logic        mux_en, relay_k1;
  logic [1:0]  dac_cs_n;
  logic        dac_rw;
  logic [11:0] dac_d_rd;
  logic        ppi_cs_n, pit_cs_n, dev_rd_n, dev_wr_n;
  logic [7:0]  ppi_d_rd, pit_d_rd;
  logic [7:0]  byte_in = 0;
  logic        byte_stb = 0, ser_clk = 0, ser_data = 0;

  cus_top dut (.*);

  // ---- models of the bought-in chips ----
  int          vin_mv [8];
  logic [11:0] sample;
  int          adc_starts, adc_a0_high;
  logic [11:0] dac_latch [2];
  int          ppi_w, ppi_r, pit_w, pit_r;

  // Ideal bipolar converter: +/-5 V (K1 = 0) or +/-10 V (K1 = 1) over 4096 codes.
  function automatic logic [11:0] adc_code(input int mv, input bit k1);
    int span = k1 ? 20000 : 10000;
    int c = ((mv + span / 2) * 4096) / span;
    if (c < 0) c = 0;
    if (c > 4095) c = 4095;
    return 12'(c);
  endfunction

  assign sample = mux_en ? adc_code(vin_mv[mux_a], relay_k1) : 12'h800;

  ads774_model #(.CONV_CYCLES(CONV_CYCLES)) u_adc (
    .clk, .cs_n(adc_cs_n), .a0(adc_a0), .rc(adc_rc), .ce(adc_ce), .sample,
    .sts(adc_sts), .d(adc_d), .starts(adc_starts), .a0_high(adc_a0_high));
  dac8012_model #(.N(2)) u_dac (
    .clk, .cs_n(dac_cs_n), .rw(dac_rw), .d_in(sys_d[11:0]), .d_out(dac_d_rd), .latch(dac_latch));
  port_chip_model u_ppi (
    .clk, .cs_n(ppi_cs_n), .rd_n(dev_rd_n), .wr_n(dev_wr_n), .a(sys_a), .d_in(sys_d[7:0]),
    .d_out(ppi_d_rd), .writes(ppi_w), .reads(ppi_r));
  port_chip_model u_pit (
    .clk, .cs_n(pit_cs_n), .rd_n(dev_rd_n), .wr_n(dev_wr_n), .a(sys_a), .d_in(sys_d[7:0]),
    .d_out(pit_d_rd), .writes(pit_w), .reads(pit_r));

  always #5 clk = ~clk;

  // ---- bookkeeping ----
  int checks = 0, failures = 0;
  typedef enum int {
    M_RANGE0, M_RANGE1, M_RANGE2, M_RANGE3, M_CONVERSION, M_BUSY_POLL, M_START_WHILE_BUSY,
    M_CHANNEL, M_RANGE_RELAY, M_DAC, M_PPI, M_PIT, M_BYTE_WORD, M_BYTE_OVERRUN,
    M_SERIAL_WORD, M_SERIAL_OVERRUN, M_IRQ, M_RANGE_DISABLED, M_FOREIGN_ADDR, M_COUNT
  } mech_e;
  int mech [M_COUNT];

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL %s at %0t", what, $time);
    end
  endtask

  function automatic void note_range(input logic [9:0] a);
    if (a >= 10'h300 && a <= 10'h31F && range_en[(a - 10'h300) >> 3])
      mech[M_RANGE0 + ((a - 10'h300) >> 3)]++;
  endfunction

  // PC I/O cycles: address set up, strobe low for two clocks, one idle clock.
  task automatic io_write(input logic [9:0] a, input logic [15:0] d);
    @(negedge clk);
    pc_addr = a; pc_d_wr = d; pc_iow_n = 0;
    repeat (2) @(negedge clk);
    pc_iow_n = 1;
    @(negedge clk);
    note_range(a);
  endtask

  task automatic io_read(input logic [9:0] a, output logic [15:0] d, output logic oe);
    @(negedge clk);
    pc_addr = a; pc_ior_n = 0;
    repeat (2) @(negedge clk);
    d = pc_d_rd; oe = pc_d_oe;
    pc_ior_n = 1;
    @(negedge clk);
    note_range(a);
  endtask

  task automatic io_read_chk(input logic [9:0] a, output logic [15:0] d);
    logic oe;
    io_read(a, d, oe);
    check(oe, $sformatf("card drives the bus on read of %h", a));
  endtask

  task automatic send_byte(input logic [7:0] b);
    @(negedge clk); byte_in = b; byte_stb = 1;
    @(negedge clk); byte_stb = 0;
  endtask

  task automatic send_serial(input logic [15:0] w);
    for (int i = 15; i >= 0; i--) begin
      @(negedge clk); ser_data = w[i];
      repeat (3) @(negedge clk); ser_clk = 1;
      repeat (3) @(negedge clk); ser_clk = 0;
    end
    repeat (5) @(negedge clk);
  endtask

  // Start a conversion on channel ch in range k1, poll, read and compare.
  task automatic convert(input int ch, input bit k1);
    logic [15:0] d;
    int polls, t0, t1, s0;
    io_write(A_ADC_CHAN, 16'(8 | ch));
    if (mux_a != 3'(ch) || !mux_en) check(0, "channel register");
    mech[M_CHANNEL]++;
    if (relay_k1 != k1) mech[M_RANGE_RELAY]++;
    io_write(A_ADC_SENS, 16'(k1));
    check(relay_k1 == k1, "range relay");
    s0 = adc_starts;
    t0 = $time;
    io_write(A_ADC_START, 16'h0);
    check(adc_starts == s0 + 1, "conversion started");
    if (ch == 3) begin   // a second start while busy must not restart the converter
      io_write(A_ADC_START, 16'h0);
      check(adc_starts == s0 + 1, "start ignored while busy");
      mech[M_START_WHILE_BUSY]++;
    end
    polls = 0;
    do begin
      io_read_chk(A_ADC_STAT, d);
      polls++;
      if (d[0]) mech[M_BUSY_POLL]++;
    end while (d[0] && polls < 100);
    t1 = $time;
    // 8.5 us at 8 MHz: busy for 68 clocks, seen within one poll (4 clocks)
    check((t1 - t0) / 10 >= CONV_CYCLES && (t1 - t0) / 10 <= CONV_CYCLES + 12,
          $sformatf("conversion time %0d clocks", (t1 - t0) / 10));
    io_read_chk(A_ADC_DATA, d);
    check(d == 16'(adc_code(vin_mv[ch], k1)),
          $sformatf("ADC ch%0d k1=%0d read %h expected %h", ch, k1, d, adc_code(vin_mv[ch], k1)));
    mech[M_CONVERSION]++;
  endtask

  initial begin : watchdog
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [15:0] d, w;
    logic [11:0] dv [2];
    logic [7:0]  pv [4];
    logic        oe;
    logic [2:0]  ch_before;
    logic [9:0]  foreign [5] = '{10'h2F8, 10'h320, 10'h378, 10'h100, 10'h3F8};

    foreach (mech[i]) mech[i] = 0;
    foreach (vin_mv[i]) vin_mv[i] = int'($urandom_range(18000)) - 9000;
    vin_mv[0] = 4900; vin_mv[1] = -4900;  // near the +/-5 V limits
    vin_mv[2] = 9800;                     // clips in the +/-5 V range
    repeat (3) @(negedge clk);
    rst_n = 1;
    check(!mux_en && !relay_k1, "reset state");

    // interrupt lines
    for (int i = 0; i < 4; i++) begin
      @(negedge clk); {sys_irq3, sys_irq5} = 2'(i); #1;
      check({pc_irq3, pc_irq5} == 2'(i), "IRQ buffering");
      mech[M_IRQ]++;
    end

    // analog input: every channel in both ranges
    for (int k = 0; k < 2; k++)
      for (int ch = 0; ch < 8; ch++)
        convert(ch, k[0]);
    check(adc_a0_high == 0, "12-bit conversion cycles only");

    // DACs: write, read back
    for (int n = 0; n < 4; n++) begin
      dv[0] = 12'($urandom); dv[1] = 12'($urandom);
      io_write(A_DAC0, {4'hF, dv[0]});
      io_write(A_DAC1, {4'hF, dv[1]});
      check(dac_latch[0] == dv[0] && dac_latch[1] == dv[1], "DAC latches");
      io_read_chk(A_DAC0, d); check(d == 16'(dv[0]), "DAC0 read back");
      io_read_chk(A_DAC1, d); check(d == 16'(dv[1]), "DAC1 read back");
      mech[M_DAC]++;
    end

    // 8255 and 8253 registers
    foreach (pv[i]) pv[i] = 8'($urandom);
    for (int i = 0; i < 4; i++) io_write(A_PPI_A + 10'(i), {8'hAA, pv[i]});
    for (int i = 0; i < 4; i++) io_write(A_PIT_C0 + 10'(i), {8'h55, ~pv[i]});
    for (int i = 0; i < 4; i++) begin
      io_read_chk(A_PPI_A + 10'(i), d);  check(d == {8'h00, pv[i]}, "8255 register");
      io_read_chk(A_PIT_C0 + 10'(i), d); check(d == {8'h00, ~pv[i]}, "8253 register");
    end
    check(ppi_w == 8 && pit_w == 8 && ppi_r == 4 && pit_r == 4, "port chip access counts");
    if (ppi_r == 4) mech[M_PPI]++;
    if (pit_r == 4) mech[M_PIT]++;

    // byte pairing
    for (int n = 0; n < 3; n++) begin
      w = 16'($urandom);
      io_read_chk(A_BUF_STAT, d); check(d[0] == 0, "no byte word yet");
      send_byte(w[7:0]);
      io_read_chk(A_BUF_STAT, d); check(d[0] == 0, "half a word is not ready");
      send_byte(w[15:8]);
      if (n == 1) begin
        send_byte(8'hEE);
        io_read_chk(A_BUF_STAT, d); check(d[1:0] == 2'b11, "byte overrun flagged");
        mech[M_BYTE_OVERRUN]++;
      end else begin
        io_read_chk(A_BUF_STAT, d); check(d[1:0] == 2'b01, "byte word ready");
      end
      io_read_chk(A_BUF_BYTE, d); check(d == w, "byte word");
      io_read_chk(A_BUF_STAT, d); check(d[1:0] == 2'b00, "byte flags cleared");
      mech[M_BYTE_WORD]++;
    end

    // serial words
    for (int n = 0; n < 3; n++) begin
      w = 16'($urandom);
      send_serial(w);
      if (n == 2) begin
        send_serial(~w);
        w = ~w;
        io_read_chk(A_BUF_STAT, d); check(d[3:2] == 2'b11, "serial overrun flagged");
        mech[M_SERIAL_OVERRUN]++;
      end else begin
        io_read_chk(A_BUF_STAT, d); check(d[3:2] == 2'b01, "serial word ready");
      end
      io_read_chk(A_BUF_SER, d); check(d == w, "serial word");
      io_read_chk(A_BUF_STAT, d); check(d[3:2] == 2'b00, "serial flags cleared");
      mech[M_SERIAL_WORD]++;
    end

    // ADC range switched off: nothing answers, nothing changes
    range_en = 4'b1101;
    ch_before = mux_a;
    io_write(A_ADC_CHAN, 16'(8 | (ch_before + 1)));
    check(mux_a == ch_before, "disabled range ignores writes");
    io_read(A_ADC_STAT, d, oe);
    check(!oe, "disabled range does not drive the bus");
    io_read(A_DAC0, d, oe);
    check(oe, "other ranges still answer");
    mech[M_RANGE_DISABLED]++;
    range_en = 4'hF;

    // addresses outside 300H-31FH
    foreach (foreign[i]) begin
      io_read(foreign[i], d, oe);
      check(!oe && dev_rd_n && adc_cs_n, "foreign address ignored");
      mech[M_FOREIGN_ADDR]++;
    end

    for (int i = 0; i < M_COUNT; i++) begin
      mech_e m;
      m = mech_e'(i);
      $display("mechanism %-20s %0d", m.name(), mech[i]);
      check(mech[i] > 0, $sformatf("mechanism %s happened", m.name()));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
