// tb_gal_analog_ctrl: PC cycles against the analog-side GAL logic.
// Every offset of the ADC and DAC ranges is read and written with busy high
// and low; the expected converter pins, DAC selects and read source come
// from the register map written out case by case below. Channel and
// sensitivity writes with random data are checked on the register outputs,
// and writes outside the ADC range must leave them alone.
module tb_gal_analog_ctrl;
  import cus_pkg::*;
  logic       clk = 0, rst_n = 0;
  logic       adc_range_sel = 0, dac_range_sel = 0, ior_n = 1, iow_n = 1, adc_sts = 0;
  logic [2:0] addr = 0;
  logic [3:0] d_wr = 0;
  logic       adc_cs_n, adc_a0, adc_rc, adc_ce, mux_en, relay_k1, dac_rw;
  logic [2:0] mux_a;
  logic [1:0] dac_cs_n;
  rd_src_e    rd_src;
  int checks = 0, failures = 0;

  gal_analog_ctrl dut (.*);
  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20)
        $display("FAIL %s: adc=%b dac=%b a=%0d rd=%b wr=%b sts=%b -> cs_n=%b ce=%b rc=%b a0=%b dcs=%b rw=%b src=%s",
                 what, adc_range_sel, dac_range_sel, addr, !ior_n, !iow_n, adc_sts,
                 adc_cs_n, adc_ce, adc_rc, adc_a0, dac_cs_n, dac_rw, rd_src.name());
    end
  endtask

  initial begin : watchdog
    repeat (10000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    bit start_exp, read_exp;
    logic [1:0] dcs_exp;
    rd_src_e src_exp;
    logic [2:0] ch; logic en, k1;
    repeat (2) @(posedge clk);
    rst_n <= 1;
    @(posedge clk);
    check(mux_en == 0 && mux_a == 0 && relay_k1 == 0, "reset values");
    // combinational decode, every case
    for (int rng = 0; rng < 3; rng++)
      for (int a = 0; a < 8; a++)
        for (int op = 0; op < 3; op++)       // 0 idle, 1 read, 2 write
          for (int busy = 0; busy < 2; busy++) begin
            adc_range_sel = (rng == 1); dac_range_sel = (rng == 2);
            addr = 3'(a); ior_n = !(op == 1); iow_n = !(op == 2); adc_sts = busy[0];
            #1;
            start_exp = (rng == 1) && op == 2 && a == 3 && !busy;
            read_exp  = (rng == 1) && op == 1 && a == 0;
            dcs_exp   = 2'b11;
            if (rng == 2 && op != 0 && a < 2) dcs_exp[a] = 1'b0;
            if (read_exp)                               src_exp = RD_ADC_DATA;
            else if (rng == 1 && op == 1 && a == 1)     src_exp = RD_ADC_STATUS;
            else if (rng == 2 && op == 1 && a < 2)      src_exp = RD_DAC;
            else                                        src_exp = RD_NONE;
            check(adc_ce == (start_exp || read_exp), "ADC CE");
            check(adc_cs_n == !(start_exp || read_exp), "ADC CS");
            check(adc_rc == !start_exp, "ADC R/C");
            check(adc_a0 == 1'b0, "ADC A0 (12-bit)");
            check(dac_cs_n == dcs_exp, "DAC selects");
            check(dac_rw == (op != 2), "DAC R/W");
            check(rd_src == src_exp, "read source");
          end
    ior_n = 1; iow_n = 1; adc_range_sel = 0; dac_range_sel = 0;
    // registered outputs
    ch = 0; en = 0; k1 = 0;
    for (int n = 0; n < 60; n++) begin
      @(negedge clk);
      addr = (n % 3 == 0) ? ADC_OFS_CHAN : (n % 3 == 1) ? ADC_OFS_SENS : 3'(n % 8);
      d_wr = 4'($urandom);
      adc_range_sel = (n % 5 != 4);
      dac_range_sel = (n % 5 == 4);
      iow_n = 0;
      @(negedge clk);
      iow_n = 1;
      if (adc_range_sel && addr == ADC_OFS_CHAN) begin ch = d_wr[2:0]; en = d_wr[3]; end
      if (adc_range_sel && addr == ADC_OFS_SENS) k1 = d_wr[0];
      check(mux_a == ch && mux_en == en, "channel register");
      check(relay_k1 == k1, "sensitivity register");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
