// tb_pcsb_bus_buffer: direction and enable rules of the slot-card buffers.
// Random PC-side and device-side values are driven with every combination of
// card select and strobes; the expected outputs follow the buffer rules:
// data to the PC only on a selected read, to the device only on a selected
// write, strobes passed on only when selected, address and IRQs always.
module tb_pcsb_bus_buffer;
  logic        card_sel, pc_ior_n, pc_iow_n, pc_d_oe, pc_irq3, pc_irq5;
  logic [9:0]  pc_addr, sys_addr;
  logic [15:0] pc_d_wr, pc_d_rd, sys_d_wr, sys_d_rd;
  logic        sys_ior_n, sys_iow_n, sys_d_oe, sys_irq3, sys_irq5;
  int checks = 0, failures = 0;

  pcsb_bus_buffer dut (.*);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL %s sel=%b ior_n=%b iow_n=%b", what, card_sel, pc_ior_n, pc_iow_n);
    end
  endtask

  initial begin : watchdog
    #1ms;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    bit rd, wr;
    for (int n = 0; n < 400; n++) begin
      card_sel = n[0]; pc_ior_n = n[1]; pc_iow_n = n[2] | ~n[1];  // never both low
      pc_addr  = 10'($urandom); pc_d_wr = 16'($urandom); sys_d_rd = 16'($urandom);
      sys_irq3 = $urandom % 2; sys_irq5 = $urandom % 2;
      #1;
      rd = card_sel && !pc_ior_n;
      wr = card_sel && !pc_iow_n;
      check(pc_d_oe == rd, "pc_d_oe");
      check(sys_d_oe == wr, "sys_d_oe");
      check(!rd || pc_d_rd == sys_d_rd, "read data");
      check(!wr || sys_d_wr == pc_d_wr, "write data");
      check(sys_ior_n == !rd && sys_iow_n == !wr, "strobes");
      check(sys_addr == pc_addr, "address");
      check(pc_irq3 == sys_irq3 && pc_irq5 == sys_irq5, "irq");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
