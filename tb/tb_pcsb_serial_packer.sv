// tb_pcsb_serial_packer: serial-to-word conversion with a slow external
// serial clock. Random 16-bit words are sent MSB first; each must appear
// whole with ready high, the word must survive bits of the next word
// arriving before the read, and a second full word before the read must set
// overrun and replace the first.
module tb_pcsb_serial_packer;
  logic        clk = 0, rst_n = 0, ser_clk = 0, ser_data = 0, rd_word = 0;
  logic [15:0] word;
  logic        ready, overrun;
  int checks = 0, failures = 0;

  pcsb_serial_packer #(.WORD_BITS(16)) dut (.*);
  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s at %0t word=%h", what, $time, word); end
  endtask
  task automatic send_bit(input logic b);
    ser_data <= b; repeat (3) @(posedge clk);
    ser_clk <= 1;  repeat (3) @(posedge clk);
    ser_clk <= 0;  repeat (3) @(posedge clk);
  endtask
  task automatic send_word(input logic [15:0] w);
    for (int i = 15; i >= 0; i--) send_bit(w[i]);
    repeat (4) @(posedge clk);
  endtask
  task automatic pc_read(output logic [15:0] w);
    rd_word <= 1; @(posedge clk); #1 w = word; @(posedge clk); rd_word <= 0; @(posedge clk); @(posedge clk);
  endtask

  initial begin : watchdog
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [15:0] a, b, w;
    repeat (3) @(posedge clk);
    rst_n <= 1;
    @(posedge clk);
    check(!ready, "idle after reset");
    for (int n = 0; n < 20; n++) begin
      a = 16'($urandom); b = 16'($urandom);
      for (int i = 15; i > 0; i--) send_bit(a[i]);
      repeat (4) @(posedge clk);
      check(!ready, "not ready after 15 bits");
      send_bit(a[0]);
      repeat (4) @(posedge clk);
      check(ready && word == a, "word after 16 bits");
      if (n % 2 == 0) begin
        send_word(b);
        check(overrun && word == b, "overrun replaces word");
        a = b;
      end
      for (int i = 15; i >= 8; i--) send_bit(~a[i]);   // half of the next word
      check(word == a, "word held while next one shifts in");
      pc_read(w);
      check(w == a, "word read by PC");
      check(!ready && !overrun, "flags clear after read");
      for (int i = 7; i >= 0; i--) send_bit(~a[i]);
      repeat (4) @(posedge clk);
      check(ready && word == ~a, "next word completes");
      pc_read(w);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
