// cosine_rom: one full period of the cosine in 256 words.
//
// Word i holds round(32767 * cos(2*pi*i/256)) as 16-bit two's complement,
// so the table index is the phase in units of 2*pi/256 and wraps naturally
// at 8 bits. The contents are in cosine_rom.hex (256 lines of 4 hex digits,
// generated from that formula), read relative to the project root. The read
// is registered: with en high on a rising edge, cosine shows the word at
// theta from the next cycle on; with en low it holds.
//
// The table size (256 samples, one period) and the registered read with an
// enable follow the original design; the exact rounding formula is this
// implementation's.
module cosine_rom
  import synth_pkg::*;
#(
  parameter string INIT_FILE = "rtl/cosine_rom.hex"
) (
  input  logic       clk,
  input  logic       en,
  input  logic [7:0] theta,
  output sample_t    cosine
);

  sample_t rom [COS_DEPTH];

  initial $readmemh(INIT_FILE, rom);

  always_ff @(posedge clk) begin
    if (en) cosine <= rom[theta];
  end

endmodule
