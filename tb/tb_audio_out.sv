// tb_audio_out: decodes the codec serial stream and checks it.
// A sample is driven every 2048 clocks; each must appear in four consecutive
// 16-bit words, MSB first, with LRCK changing at each word boundary. The
// clock periods are checked too: MCLK 4 clocks (12.5 MHz), BCLK 32 clocks
// (1.5625 MHz), LRCK 1024 clocks (48.828 kHz), and chip select stays high.
module tb_audio_out;
  localparam int PERIOD = 2048;

  logic clk = 0, rst;
  logic signed [15:0] sample_in;
  logic csn, bclk, mclk, lrck, sdti;
  int checks = 0, failures = 0;
  longint cyc = 0;
  logic signed [15:0] driven [$];    // samples in the order driven
  logic [15:0] words [$];            // decoded words
  logic [15:0] cur;
  int nbits = -1;
  logic lrck_prev, bclk_prev, mclk_prev;
  longint last_mclk = -1, last_bclk = -1, last_lrck = -1;
  int lrck_edges = 0;

  audio_out dut (.clk(clk), .rst(rst), .sample_in(sample_in), .AU_CSN_N(csn),
                 .AU_BCLK(bclk), .AU_MCLK(mclk), .AU_LRCK(lrck), .AU_SDTI(sdti));

  always #10 clk = ~clk;   // 50 MHz

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d (watchdog)", checks, failures);
    $finish;
  end

  task automatic check(bit cond, string msg);
    checks++;
    if (!cond) begin
      failures++;
      if (failures < 20) $display("ERR %s", msg);
    end
  endtask

  // sample the pins after every system clock edge
  always @(posedge clk) begin
    #1;
    if (!rst) begin
      cyc++;
      check(csn == 1'b1, "chip select low");
      if (mclk && !mclk_prev) begin
        if (last_mclk >= 0) check(cyc - last_mclk == 4, "MCLK period");
        last_mclk = cyc;
      end
      if (lrck != lrck_prev) begin
        if (last_lrck >= 0) check(cyc - last_lrck == 512, "LRCK half period");
        last_lrck = cyc;
        lrck_edges++;
        if (nbits == 16) words.push_back(cur);
        else if (nbits >= 0) check(0, $sformatf("word of %0d bits", nbits));
        nbits = 0;
        cur = '0;
      end
      if (bclk && !bclk_prev) begin
        if (last_bclk >= 0) check(cyc - last_bclk == 32, "BCLK period");
        last_bclk = cyc;
        if (nbits >= 0) begin
          cur = {cur[14:0], sdti};
          nbits++;
        end
      end
      mclk_prev = mclk; bclk_prev = bclk; lrck_prev = lrck;
    end
  end

  initial begin
    int nsamp = 40;
    rst = 1; sample_in = 16'sh1234;
    mclk_prev = 0; bclk_prev = 1; lrck_prev = 0;   // pin levels in reset
    repeat (4) @(posedge clk);
    @(negedge clk); rst = 0;
    // change the sample away from the word-load instants (phase 15 + 512k)
    repeat (300) @(posedge clk);
    for (int s = 0; s < nsamp; s++) begin
      @(negedge clk);
      sample_in = (s % 5 == 0) ? 16'sh8001 : 16'($urandom);
      driven.push_back(sample_in);
      repeat (PERIOD - 1) @(posedge clk);
    end
    repeat (600) @(posedge clk);
    // the first word loaded after each change carries that sample; words
    // 1.. (loaded at clocks 527, 1039, ...) map to driven[(w-1)/4]
    check(words.size() >= 4 * nsamp - 2, $sformatf("only %0d words", words.size()));
    for (int w = 1; w < words.size() && (w - 1) / 4 < nsamp; w++)
      check(words[w] == driven[(w - 1) / 4],
            $sformatf("word %0d = %h, expected %h", w, words[w], driven[(w - 1) / 4]));
    check(lrck_edges > 100, "LRCK not toggling");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
