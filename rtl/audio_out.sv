// audio_out: serial interface to the AK4565 audio codec's DAC.
//
// All codec clocks are divided down from the 50 MHz system clock by a 5-bit
// counter:
//   AU_MCLK  = counter bit 1          12.5 MHz master clock
//   AU_BCLK  = inverted counter bit 4 1.5625 MHz bit clock
//   AU_LRCK  = toggles every 16 bits  48.828 kHz word clock (left/right)
// The bit logic acts once per bit period, on the system clock edge at which
// counter bit 4 rises (AU_BCLK falls): a 5-bit bit counter advances, LRCK is
// updated from its top bit, and the next data bit is driven on AU_SDTI, so
// the codec can sample it on the following rising edge of AU_BCLK. At the
// first bit of each 16-bit word sample_in is captured; the word goes out most
// significant bit first, and LRCK changes together with that first bit.
//
// The synthesizers produce a new sample every 2048 clocks = 4 words, so each
// mono sample is sent twice as left and twice as right, which halves the
// codec's 48.8 kHz word rate to the design's 24.4 kHz. AU_CSN_N is held high:
// the codec's control registers are never written.
//
// Clock frequencies, MSB-first order, the 16-bit word per LRCK half and the
// constant chip select follow the original design. Deriving everything with
// clock enables in the single system clock domain, and the reset of the
// counters, are this implementation's.
module audio_out
  import synth_pkg::*;
(
  input  logic    clk,
  input  logic    rst,        // synchronous reset
  input  sample_t sample_in,
  output logic    AU_CSN_N,
  output logic    AU_BCLK,
  output logic    AU_MCLK,
  output logic    AU_LRCK,
  output logic    AU_SDTI
);

  logic [4:0]  clkcnt;
  logic [4:0]  bitcnt;
  logic [15:0] shreg;
  logic        lrck;
  logic        sdti;
  logic        bit_edge;

  assign bit_edge = (clkcnt == 5'b01111);

  always_ff @(posedge clk) begin
    if (rst) clkcnt <= '0;
    else     clkcnt <= clkcnt + 1'b1;
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      bitcnt <= '0;
      shreg  <= '0;
      lrck   <= 1'b0;
      sdti   <= 1'b0;
    end else if (bit_edge) begin
      bitcnt <= bitcnt + 1'b1;
      lrck   <= ~bitcnt[4];
      if (bitcnt[3:0] == 4'd0) begin
        sdti  <= sample_in[15];
        shreg <= {sample_in[14:0], 1'b0};
      end else begin
        sdti  <= shreg[15];
        shreg <= {shreg[14:0], 1'b0};
      end
    end
  end

  assign AU_CSN_N = 1'b1;
  assign AU_MCLK  = clkcnt[1];
  assign AU_BCLK  = ~clkcnt[4];
  assign AU_LRCK  = lrck;
  assign AU_SDTI  = sdti;

endmodule
