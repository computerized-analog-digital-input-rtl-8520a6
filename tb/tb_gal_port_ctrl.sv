// tb_gal_port_ctrl: exhaustive check of the port-chip selects. For every
// range select, A2..A0 and strobe combination the 8255 must be selected at
// offsets 0-3, the 8253 at 4-7, and strobes must reach the chips only inside
// the range.
module tb_gal_port_ctrl;
  logic       port_range_sel, ior_n, iow_n;
  logic [2:0] addr;
  logic       ppi_cs_n, pit_cs_n, dev_rd_n, dev_wr_n, ppi_rd, pit_rd;
  int checks = 0, failures = 0;

  gal_port_ctrl dut (.*);

  initial begin : watchdog
    #1ms;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    bit ppi, pit, rd, wr;
    for (int n = 0; n < 64; n++) begin
      {port_range_sel, addr, ior_n, iow_n} = 6'(n);
      #1;
      ppi = port_range_sel && addr < 4;
      pit = port_range_sel && addr >= 4;
      rd  = port_range_sel && !ior_n;
      wr  = port_range_sel && !iow_n;
      checks++;
      if (ppi_cs_n != !ppi || pit_cs_n != !pit || dev_rd_n != !rd || dev_wr_n != !wr ||
          ppi_rd != (ppi && rd) || pit_rd != (pit && rd)) begin
        failures++;
        $display("FAIL sel=%b a=%0d ior_n=%b iow_n=%b", port_range_sel, addr, ior_n, iow_n);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
