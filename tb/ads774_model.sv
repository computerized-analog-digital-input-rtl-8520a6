// ads774_model: behavioural model of the digital interface of an ADS774
// 12-bit successive-approximation ADC, for testbenches only.
//
// A conversion starts on the clk edge where CE=1, CS=0 and R/C=0 first hold
// together; the input code given on `sample` is taken at that moment, STS
// goes high for CONV_CYCLES clock cycles (the 8.5 us throughput time at an
// assumed 8 MHz clock is 68 cycles) and then the code is held. A start while
// STS is high is ignored. With CE=1, CS=0 and R/C=1 the 12-bit code is put
// on d; otherwise d reads as zero, standing in for the three-state outputs.
// The A0 pin is only observed: 12-bit mode (A0=0) is the only one modelled.
module ads774_model #(
  parameter int unsigned CONV_CYCLES = 68
) (
  input  logic        clk,
  input  logic        cs_n,
  input  logic        a0,
  input  logic        rc,
  input  logic        ce,
  input  logic [11:0] sample,
  output logic        sts,
  output logic [11:0] d,
  output int          starts,      // conversions begun
  output int          a0_high      // cycles where a start or read used A0=1
);
  logic        start_q = 1'b0;
  logic [11:0] result = '0;
  int          count = 0;
  logic        start_now;

  initial begin sts = 1'b0; starts = 0; a0_high = 0; end

  assign start_now = ce && !cs_n && !rc;
  assign d = (ce && !cs_n && rc) ? result : '0;

  always @(posedge clk) begin
    start_q <= start_now;
    if ((start_now || (ce && !cs_n)) && a0) a0_high <= a0_high + 1;
    if (start_now && !start_q && !sts) begin
      sts    <= 1'b1;
      count  <= CONV_CYCLES - 1;
      result <= sample;
      starts <= starts + 1;
    end else if (sts) begin
      if (count == 0) sts <= 1'b0;
      else            count <= count - 1;
    end
  end
endmodule
