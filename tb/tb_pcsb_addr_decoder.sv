// tb_pcsb_addr_decoder: exhaustive check of the slot-card address decoder.
// Every 10-bit address is tried with several range-enable masks; the
// expected hit is worked out arithmetically (window 300H-31FH, range =
// (addr - 300H) / 8) rather than from the address bits.
module tb_pcsb_addr_decoder;
  logic [9:0] addr;
  logic [3:0] range_en, range_sel;
  logic       all_sel;
  int checks = 0, failures = 0;

  pcsb_addr_decoder dut (.addr, .range_en, .range_sel, .all_sel);

  initial begin : watchdog
    #1ms;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [3:0] masks [4] = '{4'hF, 4'h0, 4'h5, 4'hA};
    logic [3:0] exp_sel;
    int a;
    foreach (masks[m]) begin
      for (a = 0; a < 1024; a++) begin
        addr = 10'(a);
        range_en = masks[m];
        #1;
        exp_sel = '0;
        if (a >= 'h300 && a <= 'h31F && range_en[(a - 'h300) / 8])
          exp_sel[(a - 'h300) / 8] = 1'b1;
        checks++;
        if (range_sel !== exp_sel || all_sel !== (exp_sel != 0)) begin
          failures++;
          if (failures < 10)
            $display("addr %h en %b: sel %b all %b, expected %b", addr, range_en,
                     range_sel, all_sel, exp_sel);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
