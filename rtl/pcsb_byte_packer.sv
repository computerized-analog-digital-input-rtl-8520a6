// pcsb_byte_packer: pairs device bytes into 16-bit words for the PC.
//
// The device hands over 8-bit bytes; the card keeps the first one until the
// second has arrived and then offers both as one 16-bit word, so the PC
// fetches two bytes with a single I/O read. The first byte of a pair lands in
// D7..D0, the second in D15..D8, and ready rises with the second byte. The
// word stays put until the PC has read it: ready and the overrun flag clear
// at the end of the read (falling edge of rd_word). A byte that arrives while
// a complete word is still unread is dropped and sets overrun.
//
// Timing: byte_stb is a one-cycle strobe in the clk domain; ready rises the
// cycle after the second strobe. Pairing bytes into words follows the
// system description; byte order, the hand-shake and the overrun rule are
// this design's choice.
module pcsb_byte_packer (
  input  logic        clk,
  input  logic        rst_n,
  input  logic [7:0]  byte_in,
  input  logic        byte_stb,
  input  logic        rd_word,   // high while the PC reads the word
  output logic [15:0] word,
  output logic        ready,
  output logic        overrun
);

  logic have_low;   // first byte of a pair held
  logic rd_q;       // rd_word one cycle ago
  logic rd_done;    // end of a PC read

  assign rd_done = rd_q && !rd_word;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      word     <= '0;
      ready    <= 1'b0;
      overrun  <= 1'b0;
      have_low <= 1'b0;
      rd_q     <= 1'b0;
    end else begin
      rd_q <= rd_word;
      if (rd_done) begin
        ready   <= 1'b0;
        overrun <= 1'b0;
      end
      if (byte_stb) begin
        if (ready && !rd_done) begin
          overrun <= 1'b1;
        end else if (!have_low) begin
          word[7:0] <= byte_in;
          have_low  <= 1'b1;
        end else begin
          word[15:8] <= byte_in;
          have_low   <= 1'b0;
          ready      <= 1'b1;
        end
      end
    end
  end

  assert property (@(posedge clk) disable iff (!rst_n) ready |-> !have_low)
    else $error("byte packer holds a half word while a full word is pending");

endmodule
