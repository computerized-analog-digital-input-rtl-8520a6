// pcsb_serial_packer: gathers a serial bit stream into 16-bit words for the
// PC.
//
// Bits arrive one at a time on ser_data with a rising edge of ser_clk. The
// serial clock comes from outside, so it passes two synchroniser flip-flops
// and its rising edge is detected in the clk domain. Bits shift in MSB first:
// the first bit of a word ends in D15. After WORD_BITS bits the shift
// register is copied into the output word and ready rises; shifting carries
// on at once, so the next word can arrive while the PC reads this one. A word
// that completes while the previous one is still unread replaces it and sets
// overrun. ready and overrun clear at the end of the PC read (falling edge of
// rd_word).
//
// Timing: a bit is taken three clk cycles after the ser_clk rising edge; the
// serial clock must stay high and low for at least two clk cycles each.
// Building 16-bit words from serial bits follows the system description; bit
// order, synchronisation and the overrun rule are this design's choice.
module pcsb_serial_packer #(
  parameter int unsigned WORD_BITS = 16
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 ser_clk,
  input  logic                 ser_data,
  input  logic                 rd_word,
  output logic [WORD_BITS-1:0] word,
  output logic                 ready,
  output logic                 overrun
);

  localparam int unsigned CW = $clog2(WORD_BITS);

  logic [2:0]           clk_sync;   // synchroniser and edge detector
  logic [1:0]           dat_sync;
  logic                 bit_take;
  logic [WORD_BITS-1:0] shreg;
  logic [CW-1:0]        nbits;
  logic                 rd_q;
  logic                 rd_done;

  assign bit_take = clk_sync[1] && !clk_sync[2];
  assign rd_done  = rd_q && !rd_word;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      clk_sync <= '0;
      dat_sync <= '0;
      shreg    <= '0;
      nbits    <= '0;
      word     <= '0;
      ready    <= 1'b0;
      overrun  <= 1'b0;
      rd_q     <= 1'b0;
    end else begin
      clk_sync <= {clk_sync[1:0], ser_clk};
      dat_sync <= {dat_sync[0], ser_data};
      rd_q     <= rd_word;
      if (rd_done) begin
        ready   <= 1'b0;
        overrun <= 1'b0;
      end
      if (bit_take) begin
        shreg <= {shreg[WORD_BITS-2:0], dat_sync[1]};
        if (nbits == CW'(WORD_BITS - 1)) begin
          nbits <= '0;
          word  <= {shreg[WORD_BITS-2:0], dat_sync[1]};
          ready <= 1'b1;
          if (ready && !rd_done) overrun <= 1'b1;
        end else begin
          nbits <= nbits + 1'b1;
        end
      end
    end
  end

endmodule
