// synth_regs: OPB slave holding the synthesizer's control registers.
//
// The peripheral owns a 256-byte window at C_BASEADDR (0xFEFF0300). A bus
// cycle is claimed when OPB_select is high and the upper 24 address bits
// match. Address, data and direction are registered on the first clock; on
// the next clock Sl_xferAck is pulsed and, for a write, the register named by
// the low address byte is updated. xferAck is never high on two clocks in a
// row, so a held OPB_select gives one transfer every other clock.
//
// Register map (offset = low address byte; voice v = 0..5):
//   0x10+16v  WG_EN     bit 0    waveguide v enable
//   0x11+16v  WG_RST    bit 0    waveguide v delay-line reinitialise
//   0x12+16v  WG_LEN    bits 7:0 waveguide v delay-line length N
//   0x70+16v  FM_EN     bit 0    FM voice v enable
//   0x72+16v  FM_THETA  32 bits  FM voice v carrier phase increment
//   0xF0      FM_MOD    bits 3:0 FM carrier-to-modulator ratio code
//   0xFF      SYNTH_SEL bit 0    0 = FM synthesizer, 1 = waveguides
// Byte-wide registers take the most significant byte lane of OPB_DBus
// (OPB bit 0-7, here [31:24]), relying on the master to replicate a byte
// store on every lane; FM_THETA takes the whole word. Other offsets are
// ignored. Reads are acknowledged and return zero; Sl_errAck, Sl_retry and
// Sl_toutSup stay low. All registers clear on OPB_Rst.
//
// The map, the bit assignments and the one-clock-late acknowledge follow the
// original design. Vectors are numbered [31:0] with bit 31 the bus's bit 0.
// This design's choices: FM_MOD keeps the register table's 4 bits, although
// the original FM engine takes an 8-bit code; reads return zero; reset
// clears every register.
module synth_regs
  import synth_pkg::*;
#(
  parameter logic [31:0] C_BASEADDR = 32'hFEFF_0300,
  parameter int unsigned WG_VOICES  = NUM_WG,
  parameter int unsigned FM_VOICES  = NUM_FM
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

  output logic        wg_en    [WG_VOICES],
  output logic        wg_rst   [WG_VOICES],
  output logic [7:0]  wg_len   [WG_VOICES],
  output logic        fm_en    [FM_VOICES],
  output logic [31:0] fm_theta [FM_VOICES],
  output logic [3:0]  fm_mod,
  output synth_sel_e  synth_sel
);

  logic        cs;
  logic        xfer;
  logic        rnw_q;
  logic [7:0]  addr_q;
  logic [31:0] data_q;
  logic [7:0]  byte_q;

  assign cs     = OPB_select && (OPB_ABus[31:8] == C_BASEADDR[31:8]);
  assign byte_q = data_q[31:24];

  always_ff @(posedge OPB_Clk) begin
    if (OPB_Rst) begin
      xfer   <= 1'b0;
      rnw_q  <= 1'b1;
      addr_q <= '0;
      data_q <= '0;
    end else begin
      xfer   <= cs && !xfer;
      rnw_q  <= OPB_RNW;
      addr_q <= OPB_ABus[7:0];
      data_q <= OPB_DBus;
    end
  end

  always_ff @(posedge OPB_Clk) begin
    if (OPB_Rst) begin
      for (int v = 0; v < WG_VOICES; v++) begin
        wg_en[v]  <= 1'b0;
        wg_rst[v] <= 1'b0;
        wg_len[v] <= '0;
      end
      for (int v = 0; v < FM_VOICES; v++) begin
        fm_en[v]    <= 1'b0;
        fm_theta[v] <= '0;
      end
      fm_mod    <= '0;
      synth_sel <= SEL_FM;
    end else if (xfer && !rnw_q) begin
      for (int v = 0; v < WG_VOICES; v++) begin
        if (addr_q == REG_WG_BASE + 8'(16 * v))      wg_en[v]  <= byte_q[0];
        if (addr_q == REG_WG_BASE + 8'(16 * v + 1))  wg_rst[v] <= byte_q[0];
        if (addr_q == REG_WG_BASE + 8'(16 * v + 2))  wg_len[v] <= byte_q;
      end
      for (int v = 0; v < FM_VOICES; v++) begin
        if (addr_q == REG_FM_BASE + 8'(16 * v))      fm_en[v]    <= byte_q[0];
        if (addr_q == REG_FM_BASE + 8'(16 * v + 2))  fm_theta[v] <= data_q;
      end
      if (addr_q == REG_FM_MOD)    fm_mod    <= byte_q[3:0];
      if (addr_q == REG_SYNTH_SEL) synth_sel <= synth_sel_e'(byte_q[0]);
    end
  end

  assign Sl_xferAck = xfer;
  assign Sl_DBus    = '0;
  assign Sl_errAck  = 1'b0;
  assign Sl_retry   = 1'b0;
  assign Sl_toutSup = 1'b0;

  // Bus rules: an acknowledge answers a cycle this slave claimed, and never
  // lasts more than one clock.
  property p_ack_single;
    @(posedge OPB_Clk) disable iff (OPB_Rst) Sl_xferAck |=> !Sl_xferAck;
  endproperty
  property p_ack_claimed;
    @(posedge OPB_Clk) disable iff (OPB_Rst) Sl_xferAck |-> $past(cs);
  endproperty
  a_ack_single:  assert property (p_ack_single);
  a_ack_claimed: assert property (p_ack_claimed);

endmodule
