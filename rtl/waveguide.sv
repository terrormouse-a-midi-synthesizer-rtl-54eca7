// waveguide: one Karplus-Strong plucked-string voice.
//
// A delay line of N samples is closed into a loop through the two-tap loop
// filter H(z) = -0.5 * (1 + z^-1). With y[n] the output,
//     y[n] = -0.5 * (y[n-N] + y[n-N-1])
// so N (the `length` input, 1..255) sets the pitch, about fs / N, and the
// low-pass filter makes the high harmonics die away first. The loop is seeded
// with white noise, which plays the part of the pluck.
//
// The sign of the loop gain is a parameter. NEG_LOOP = 1 (default) is the
// filter as specified for the hardware, -0.5 * (1 + z^-1): the wave inverts
// on every trip, so it repeats every 2N+1 samples and has only odd
// harmonics. NEG_LOOP = 0 gives the textbook Karplus-Strong loop,
// +0.5 * (1 + z^-1), with period N + 0.5 samples.
//
// Storage is a 256 x 16 RAM (delayline) used as a shift register: word k holds
// y[n-1-k], k = 0..N. Once per sample period (CYCLES_PER_SAMPLE clocks, a
// free-running counter) the state machine
//   1. reads words N-1 and N and computes the filtered sample,
//   2. walks k = N-1 down to 0 copying word k into word k+1 (a read, a clock
//      for the RAM's read latency and a write: three clocks per word),
//   3. writes the new sample into word 0 and presents it on sample_out.
// From the sample tick to the new sample_out takes 3N+5 clocks, 770 at
// N = 255, inside the 2048-clock budget.
//
// Control: with `enable` low the voice is silent (sample_out = 0) and no work
// is done. With enable high, `reset` high reinitialises the delay line: while
// reset stays high the voice waits, and after it falls words 0..N are filled,
// one per clock, from a 16-bit LFSR (x^16 + x^14 + x^13 + x^11 + 1, restarted
// from the same seed on every reset, halved in amplitude). The voice then
// runs. After system reset (`rst`) the line is unloaded and the voice stays
// silent until it is reset once.
//
// The loop filter, the RAM size, the shift-through-the-RAM scheme and the
// enable/reset/length interface follow the original design. The noise
// generator, the saturation of the one overflowing case (-(-32768)), the
// exact state sequence and the `busy` flag are this implementation's.
module waveguide
  import synth_pkg::*;
#(
  parameter int unsigned SAMPLE_PERIOD = CYCLES_PER_SAMPLE,
  parameter logic [15:0] NOISE_SEED    = 16'hACE1,
  parameter bit          NEG_LOOP      = 1'b1     // loop filter sign: 1 = -0.5, 0 = +0.5
) (
  input  logic          clk,
  input  logic          rst,          // synchronous system reset
  input  logic          enable,
  input  logic          reset,        // reinitialise the delay line
  input  logic [7:0]    length,       // N, delay line length in samples
  output sample_t       sample_out,
  output logic          busy          // state machine is computing a sample
);

  typedef enum logic [3:0] {
    S_OFF,      // line not initialised, silent
    S_LOAD,     // writing the noise excitation
    S_IDLE,     // waiting for the next sample period
    S_RD_A,     // RAM reads word N-1
    S_RD_B,     // RAM reads word N, word N-1 arrives
    S_FILT,     // word N arrives, compute the new sample
    S_SH_D,     // RAM reads word k
    S_SH_W,     // word k arrives, write it to word k+1
    S_SH_R,     // step to word k-1, or write the new sample into word 0
    S_FEED      // RAM writes word 0, sample is presented
  } state_e;

  localparam int unsigned CW = $clog2(SAMPLE_PERIOD);

  state_e        state;
  logic [CW-1:0] cnt;
  logic [7:0]    addr;
  logic          ram_en, ram_we;
  sample_t       ram_din, ram_dout;
  sample_t       y_a;           // y[n-N]
  sample_t       y_new;
  logic [15:0]   lfsr;
  logic          tick;

  assign tick = (cnt == '0);
  assign busy = (state inside {S_RD_A, S_RD_B, S_FILT, S_SH_D, S_SH_W, S_SH_R, S_FEED});

  // Loop filter: -0.5 * (y[n-N] + y[n-N-1]) (or +0.5 with NEG_LOOP = 0),
  // saturated to 16 bits
  function automatic sample_t loop_filter(input sample_t a, input sample_t b);
    logic signed [16:0] s;
    s = 17'(a >>> 1) + 17'(b >>> 1);
    if (NEG_LOOP) s = -s;
    if (s > 17'sd32767) return 16'sh7FFF;
    return s[15:0];
  endfunction

  always_ff @(posedge clk) begin
    if (rst) cnt <= '0;
    else     cnt <= (cnt == CW'(SAMPLE_PERIOD - 1)) ? '0 : cnt + 1'b1;
  end

  // The RAM control signals are registered: what a state sets, the RAM does
  // during the following clock, and read data appear one clock after that.
  always_ff @(posedge clk) begin
    if (rst) begin
      state      <= S_OFF;
      addr       <= '0;
      ram_en     <= 1'b0;
      ram_we     <= 1'b0;
      ram_din    <= '0;
      y_a        <= '0;
      y_new      <= '0;
      lfsr       <= NOISE_SEED;
      sample_out <= '0;
    end else begin
      ram_en <= 1'b0;
      ram_we <= 1'b0;
      if (!enable) begin
        sample_out <= '0;
        if (busy) state <= S_IDLE;
      end else if (reset) begin
        state <= S_LOAD;
        addr  <= '0;
        lfsr  <= NOISE_SEED;
      end else begin
        unique case (state)
          S_OFF: ;
          S_LOAD: begin
            if (length == 8'd0) begin
              state <= S_IDLE;
            end else begin
              ram_en  <= 1'b1;
              ram_we  <= 1'b1;
              ram_din <= sample_t'($signed(lfsr) >>> 1);
              lfsr    <= {lfsr[14:0], lfsr[15] ^ lfsr[13] ^ lfsr[12] ^ lfsr[10]};
              if (ram_en) begin
                addr <= addr + 1'b1;
                if (addr + 1'b1 == length) state <= S_IDLE;
              end
            end
          end
          S_IDLE: begin
            if (tick && length != 8'd0) begin
              addr   <= length - 1'b1;
              ram_en <= 1'b1;
              state  <= S_RD_A;
            end
          end
          S_RD_A: begin
            addr   <= length;
            ram_en <= 1'b1;
            state  <= S_RD_B;
          end
          S_RD_B: begin
            y_a   <= ram_dout;
            state <= S_FILT;
          end
          S_FILT: begin
            y_new  <= loop_filter(y_a, ram_dout);
            addr   <= length - 1'b1;
            ram_en <= 1'b1;
            state  <= S_SH_D;
          end
          S_SH_D: state <= S_SH_W;
          S_SH_W: begin
            ram_en  <= 1'b1;
            ram_we  <= 1'b1;
            ram_din <= ram_dout;
            addr    <= addr + 1'b1;
            state   <= S_SH_R;
          end
          S_SH_R: begin
            ram_en <= 1'b1;
            if (addr == 8'd1) begin
              // word 0 has been copied into word 1: close the loop
              ram_we  <= 1'b1;
              ram_din <= y_new;
              addr    <= '0;
              state   <= S_FEED;
            end else begin
              addr  <= addr - 8'd2;
              state <= S_SH_D;
            end
          end
          S_FEED: begin
            sample_out <= y_new;
            state      <= S_IDLE;
          end
          default: state <= S_IDLE;
        endcase
      end
    end
  end

  delayline #(.DEPTH(DL_DEPTH), .WIDTH(SAMPLE_W)) u_dl (
    .clk      (clk),
    .en       (ram_en),
    .we       (ram_we),
    .addr     (addr),
    .data_in  (ram_din),
    .data_out (ram_dout)
  );

endmodule
