// tb_pcsb_byte_packer: byte pairing, PC read hand-shake and overrun.
// A stream of random bytes is sent; after every pair the word must be
// {second, first} with ready high, and a byte sent before the read must set
// overrun and be dropped without disturbing the pending word.
module tb_pcsb_byte_packer;
  logic        clk = 0, rst_n = 0, byte_stb = 0, rd_word = 0;
  logic [7:0]  byte_in = 0;
  logic [15:0] word;
  logic        ready, overrun;
  int checks = 0, failures = 0;

  pcsb_byte_packer dut (.*);
  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask
  task automatic send(input logic [7:0] b);
    byte_in <= b; byte_stb <= 1; @(posedge clk); byte_stb <= 0; @(posedge clk);
  endtask
  task automatic pc_read(output logic [15:0] w);
    rd_word <= 1; @(posedge clk); #1 w = word; @(posedge clk); rd_word <= 0; @(posedge clk); @(posedge clk);
  endtask

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [7:0] lo, hi, junk;
    logic [15:0] w;
    repeat (3) @(posedge clk);
    rst_n <= 1;
    @(posedge clk);
    check(!ready && !overrun, "idle after reset");
    for (int n = 0; n < 50; n++) begin
      lo = 8'($urandom); hi = 8'($urandom); junk = 8'($urandom);
      send(lo);
      check(!ready, "not ready after one byte");
      send(hi);
      check(ready && word == {hi, lo}, "word after two bytes");
      if (n % 3 == 0) begin
        send(junk);
        check(overrun && word == {hi, lo}, "overrun keeps pending word");
      end
      pc_read(w);
      check(w == {hi, lo}, "word read by PC");
      check(!ready && !overrun, "flags clear after read");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
