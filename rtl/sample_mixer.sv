// sample_mixer: waveguide adder and synthesizer-select multiplexer.
//
// The six waveguide outputs (16-bit two's complement) are added in a 19-bit
// accumulator, wide enough that six full-scale samples cannot overflow, and
// the top 16 bits [18:3] (the sum divided by 8) form the waveguide bank's
// sample. synth_sel picks that sample (SEL_WG) or the FM synthesizer's
// already-mixed sample (SEL_FM). The result is registered: sample_out follows
// the inputs one clock later.
//
// The adder width, the [18:3] scaling and the select encoding follow the
// original design; the single pipeline register is this implementation's.
module sample_mixer
  import synth_pkg::*;
#(
  parameter int unsigned VOICES = NUM_WG
) (
  input  logic       clk,
  input  logic       rst,
  input  sample_t    wg_sample [VOICES],
  input  sample_t    fm_sample,
  input  synth_sel_e synth_sel,
  output sample_t    sample_out
);

  localparam int unsigned AW = SAMPLE_W + $clog2(VOICES);   // 19 for six voices

  logic signed [AW-1:0] wg_sum;

  always_comb begin
    wg_sum = '0;
    for (int v = 0; v < VOICES; v++) wg_sum += AW'(wg_sample[v]);
  end

  always_ff @(posedge clk) begin
    if (rst)                      sample_out <= '0;
    else if (synth_sel == SEL_WG) sample_out <= wg_sum[AW-1 -: SAMPLE_W];
    else                          sample_out <= fm_sample;
  end

endmodule
