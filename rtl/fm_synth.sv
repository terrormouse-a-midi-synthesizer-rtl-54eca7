// fm_synth: six-voice FM synthesizer sharing one cosine ROM.
//
// Each voice computes x = cos(theta_c + I * cos(theta_m)). The carrier phase
// theta_c and the modulator phase theta_m are 32-bit accumulators in which
// bits [19:12] are the cosine-table index (a 20-bit phase, 8 integer bits and
// 12 fraction bits; the upper 12 bits just wrap). Once per sample the carrier
// phase advances by the voice's theta input (w_c) and the modulator phase by
// w_m, which ctom derives from w_c (see synth_pkg::mod_increment):
//     0: none  1: fixed 0xF00 (89 Hz)  2: w_c/256  3: 1x  4: 1.5x  5: 2x
//     6: 2.5x  7: 3x  8: 3.5x  9: 4x   other codes: none.
// A tone's frequency is theta * fs / 2^20, fs = 50 MHz / 2048.
// The modulation index is fixed: the upper byte of the modulator's cosine
// (a signed value of -128..127 table steps, about +-pi radians) is added to
// the carrier's table index.
//
// Timing: a free-running counter of CYCLES_PER_SAMPLE clocks starts a pass
// over the voices; each voice takes six clocks (modulator lookup, latch,
// modulator phase update, carrier lookup, latch, carrier phase update), so
// the pass takes 36 clocks. Disabled voices still advance their phases but
// contribute zero. The six 16-bit voice samples are then summed into 19 bits
// and bits [18:3] are presented on sample_out, 38 clocks after the pass
// starts; sample_out then holds for the rest of the 2048-clock period.
//
// Six voices, the shared 256-word ROM, the six-clock voice schedule, the
// CToM ratio table and the 19-bit sum follow the original design. The fixed
// modulation depth and the exact points of the schedule are this
// implementation's choices.
module fm_synth
  import synth_pkg::*;
#(
  parameter int unsigned SAMPLE_PERIOD = CYCLES_PER_SAMPLE,
  parameter int unsigned VOICES        = NUM_FM
) (
  input  logic        clk,
  input  logic        rst,
  input  logic [31:0] theta_inc [VOICES],   // carrier increment per voice
  input  logic        voice_en  [VOICES],
  input  logic [7:0]  ctom,                 // carrier-to-modulator ratio code
  output sample_t     sample_out
);

  localparam int unsigned CW = $clog2(SAMPLE_PERIOD);
  localparam int unsigned VW = $clog2(VOICES + 1);
  localparam int unsigned SW = SAMPLE_W + $clog2(VOICES);   // 19 bits for six voices

  logic [CW-1:0] cnt;
  logic          run;         // voice pass in progress
  logic [VW-1:0] voice;
  logic [2:0]    step;
  logic          sum_now, out_now;

  logic [31:0]   theta_c [VOICES];
  logic [31:0]   theta_m [VOICES];
  sample_t       vsample [VOICES];
  sample_t       mod_r;
  sample_t       cos_q;
  logic          rom_en;
  logic [7:0]    rom_addr;
  logic signed [SW-1:0] sum;

  always_ff @(posedge clk) begin
    if (rst) cnt <= '0;
    else     cnt <= (cnt == CW'(SAMPLE_PERIOD - 1)) ? '0 : cnt + 1'b1;
  end

  // Voice / step sequencer
  always_ff @(posedge clk) begin
    if (rst) begin
      run     <= 1'b0;
      voice   <= '0;
      step    <= '0;
      sum_now <= 1'b0;
      out_now <= 1'b0;
    end else begin
      sum_now <= 1'b0;
      out_now <= sum_now;
      if (!run) begin
        if (cnt == '0) begin
          run   <= 1'b1;
          voice <= '0;
          step  <= '0;
        end
      end else if (step == 3'd5) begin
        step <= '0;
        if (voice == VW'(VOICES - 1)) begin
          run     <= 1'b0;
          sum_now <= 1'b1;
        end else begin
          voice <= voice + 1'b1;
        end
      end else begin
        step <= step + 1'b1;
      end
    end
  end

  always_comb begin
    rom_en   = run && (step == 3'd0 || step == 3'd3);
    rom_addr = (step == 3'd0) ? theta_m[voice][19:12]
                              : theta_c[voice][19:12] + mod_r[15:8];
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      for (int v = 0; v < VOICES; v++) begin
        theta_c[v] <= '0;
        theta_m[v] <= '0;
        vsample[v] <= '0;
      end
      mod_r <= '0;
    end else if (run) begin
      unique case (step)
        3'd1: mod_r <= cos_q;
        3'd2: theta_m[voice] <= theta_m[voice] + mod_increment(ctom, theta_inc[voice]);
        3'd4: vsample[voice] <= voice_en[voice] ? cos_q : '0;
        3'd5: theta_c[voice] <= theta_c[voice] + theta_inc[voice];
        default: ;
      endcase
    end
  end

  // Mix: sum the voices, keep the top 16 of 19 bits
  always_ff @(posedge clk) begin
    if (rst) begin
      sum        <= '0;
      sample_out <= '0;
    end else begin
      if (sum_now) begin
        logic signed [SW-1:0] acc;
        acc = '0;
        for (int v = 0; v < VOICES; v++) acc += SW'(vsample[v]);
        sum <= acc;
      end
      if (out_now) sample_out <= sum[SW-1 -: SAMPLE_W];
    end
  end

  cosine_rom u_rom (
    .clk    (clk),
    .en     (rom_en),
    .theta  (rom_addr),
    .cosine (cos_q)
  );

endmodule
