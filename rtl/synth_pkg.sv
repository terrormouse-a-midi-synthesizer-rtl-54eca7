// synth_pkg: constants and types shared by the synthesizer peripheral.
//
// All audio in the design is 16-bit two's complement. Every voice produces one
// new sample per CYCLES_PER_SAMPLE clocks of the 50 MHz system clock, which
// gives 50 MHz / 2048 = 24.414 kHz. There are six waveguide voices and six FM
// voices. The register offsets are the low byte of the peripheral's address
// window (base 0xFEFF0300): voice v (0-based) of the waveguide bank sits at
// 0x10 + 16*v, voice v of the FM bank at 0x70 + 16*v.
package synth_pkg;

  localparam int unsigned SAMPLE_W          = 16;
  localparam int unsigned CYCLES_PER_SAMPLE = 2048;
  localparam int unsigned NUM_WG            = 6;
  localparam int unsigned NUM_FM            = 6;
  localparam int unsigned DL_DEPTH          = 256;   // delay line RAM words
  localparam int unsigned DL_AW             = 8;
  localparam int unsigned COS_DEPTH         = 256;   // cosine ROM words
  localparam int unsigned MIX_W             = 19;    // waveguide accumulator

  typedef logic signed [SAMPLE_W-1:0] sample_t;

  // Register offsets inside the 256-byte window
  localparam logic [7:0] REG_WG_BASE   = 8'h10;  // +0 EN, +1 RST, +2 LEN
  localparam logic [7:0] REG_FM_BASE   = 8'h70;  // +0 EN, +2 THETA
  localparam logic [7:0] REG_FM_MOD    = 8'hF0;
  localparam logic [7:0] REG_SYNTH_SEL = 8'hFF;

  // SYNTH_SEL encoding
  typedef enum logic {
    SEL_FM = 1'b0,
    SEL_WG = 1'b1
  } synth_sel_e;

  // FM_MOD (CToM) encoding: modulator frequency as a function of the
  // carrier increment w_c. Codes 10 and above give no modulation.
  typedef enum logic [7:0] {
    CTOM_NONE    = 8'd0,  // w_m = 0 (pure sine)
    CTOM_FIXED   = 8'd1,  // w_m = 89 Hz
    CTOM_DIV256  = 8'd2,  // w_m = w_c / 256
    CTOM_X1      = 8'd3,
    CTOM_X1_5    = 8'd4,
    CTOM_X2      = 8'd5,
    CTOM_X2_5    = 8'd6,
    CTOM_X3      = 8'd7,
    CTOM_X3_5    = 8'd8,
    CTOM_X4      = 8'd9
  } ctom_e;

  // Modulator increment for a fixed 89 Hz: 0xF00 / 2^20 * 24414 Hz
  localparam logic [31:0] FIXED_MOD_INC = 32'h0000_0F00;

  // Modulator phase increment selected by the CToM code.
  function automatic logic [31:0] mod_increment(input logic [7:0] ctom,
                                                input logic [31:0] wc);
    logic [31:0] half;
    half = wc >> 1;
    case (ctom)
      CTOM_NONE:   return 32'd0;
      CTOM_FIXED:  return FIXED_MOD_INC;
      CTOM_DIV256: return wc >> 8;
      CTOM_X1:     return wc;
      CTOM_X1_5:   return wc + half;
      CTOM_X2:     return wc + wc;
      CTOM_X2_5:   return wc + wc + half;
      CTOM_X3:     return wc + wc + wc;
      CTOM_X3_5:   return wc + wc + wc + half;
      CTOM_X4:     return wc + wc + wc + wc;
      default:     return 32'd0;
    endcase
  endfunction

endpackage
