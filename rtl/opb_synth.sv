// opb_synth: the TerrorMouse synthesizer peripheral.
//
// A processor writes note commands into memory-mapped registers
// (synth_regs); the peripheral turns them into sound. It holds two sound
// engines of six voices each:
//   * six Karplus-Strong waveguides (plucked string), each with its own
//     enable, delay-line reinitialise and delay-line length N;
//   * one six-voice FM synthesizer, with an enable and a 32-bit carrier phase
//     increment per voice and one modulation-ratio code (FM_MOD) shared by
//     all voices.
// The waveguide outputs are summed in sample_mixer, which also selects
// between that sum and the FM output under SYNTH_SEL. The chosen 16-bit
// sample is serialised to the AK4565 codec by audio_out.
//
// Timing: every engine produces one sample per 2048 clocks of the 50 MHz
// system clock, 24.414 kHz. The engines run from free-running counters that
// all clear on OPB_Rst, so they stay in step. The codec receives each sample
// four times (two left/right pairs at 48.828 kHz).
//
// Interface: OPB slave signals (vectors [31:0], bit 31 = OPB bit 0; see
// synth_regs for the register map) and the five codec pins. OPB_BE and
// OPB_seqAddr are accepted but not needed by the byte-lane scheme and are
// unused. OPB_Clk clocks the whole peripheral, the synthesizers included.
//
// The structure (register file, six waveguides, FM synthesizer, adder,
// multiplexer, audio output) follows the original design. Using the bus clock
// for the synthesizers and resetting them with OPB_Rst are this
// implementation's choices.
module opb_synth
  import synth_pkg::*;
#(
  parameter logic [31:0] C_BASEADDR = 32'hFEFF_0300
) (
  input  logic        OPB_Clk,
  input  logic        OPB_Rst,
  input  logic [31:0] OPB_ABus,
  input  logic [3:0]  OPB_BE,
  input  logic [31:0] OPB_DBus,
  input  logic        OPB_RNW,
  input  logic        OPB_select,
  input  logic        OPB_seqAddr,
  output logic [31:0] Sl_DBus,
  output logic        Sl_errAck,
  output logic        Sl_retry,
  output logic        Sl_toutSup,
  output logic        Sl_xferAck,

  output logic        AU_CSN_N,
  output logic        AU_BCLK,
  output logic        AU_MCLK,
  output logic        AU_LRCK,
  output logic        AU_SDTI
);

  logic        wg_en    [NUM_WG];
  logic        wg_rst   [NUM_WG];
  logic [7:0]  wg_len   [NUM_WG];
  sample_t     wg_out   [NUM_WG];
  logic        wg_busy  [NUM_WG];
  logic        fm_en    [NUM_FM];
  logic [31:0] fm_theta [NUM_FM];
  logic [3:0]  fm_mod;
  synth_sel_e  synth_sel;
  sample_t     fm_out;
  sample_t     synth_out;

  synth_regs #(
    .C_BASEADDR (C_BASEADDR),
    .WG_VOICES  (NUM_WG),
    .FM_VOICES  (NUM_FM)
  ) u_regs (
    .OPB_Clk     (OPB_Clk),
    .OPB_Rst     (OPB_Rst),
    .OPB_ABus    (OPB_ABus),
    .OPB_BE      (OPB_BE),
    .OPB_DBus    (OPB_DBus),
    .OPB_RNW     (OPB_RNW),
    .OPB_select  (OPB_select),
    .OPB_seqAddr (OPB_seqAddr),
    .Sl_DBus     (Sl_DBus),
    .Sl_errAck   (Sl_errAck),
    .Sl_retry    (Sl_retry),
    .Sl_toutSup  (Sl_toutSup),
    .Sl_xferAck  (Sl_xferAck),
    .wg_en       (wg_en),
    .wg_rst      (wg_rst),
    .wg_len      (wg_len),
    .fm_en       (fm_en),
    .fm_theta    (fm_theta),
    .fm_mod      (fm_mod),
    .synth_sel   (synth_sel)
  );

  for (genvar v = 0; v < NUM_WG; v++) begin : g_wg
    waveguide u_wg (
      .clk        (OPB_Clk),
      .rst        (OPB_Rst),
      .enable     (wg_en[v]),
      .reset      (wg_rst[v]),
      .length     (wg_len[v]),
      .sample_out (wg_out[v]),
      .busy       (wg_busy[v])
    );
  end

  fm_synth u_fm (
    .clk        (OPB_Clk),
    .rst        (OPB_Rst),
    .theta_inc  (fm_theta),
    .voice_en   (fm_en),
    .ctom       ({4'b0000, fm_mod}),
    .sample_out (fm_out)
  );

  sample_mixer #(.VOICES(NUM_WG)) u_mix (
    .clk        (OPB_Clk),
    .rst        (OPB_Rst),
    .wg_sample  (wg_out),
    .fm_sample  (fm_out),
    .synth_sel  (synth_sel),
    .sample_out (synth_out)
  );

  audio_out u_audio (
    .clk       (OPB_Clk),
    .rst       (OPB_Rst),
    .sample_in (synth_out),
    .AU_CSN_N  (AU_CSN_N),
    .AU_BCLK   (AU_BCLK),
    .AU_MCLK   (AU_MCLK),
    .AU_LRCK   (AU_LRCK),
    .AU_SDTI   (AU_SDTI)
  );

  // A waveguide must finish its sample well inside the 2048-clock period.
  for (genvar v = 0; v < NUM_WG; v++) begin : g_chk
    a_wg_budget: assert property (@(posedge OPB_Clk) disable iff (OPB_Rst)
      wg_busy[v] |-> ##[1:1000] !wg_busy[v]);
  end

endmodule
