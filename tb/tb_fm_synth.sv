// tb_fm_synth: six FM voices against a phase-accumulator model built on
// $cos, for every ratio code (and an unused one), random carrier increments
// and random voice enables. Also checks that the output changes at one fixed
// point of the 2048-clock period only, i.e. one sample per 2048 clocks.
module tb_fm_synth;
  import synth_ref_pkg::*;
  localparam int PERIOD = 2048;

  logic clk = 0, rst;
  logic [31:0] theta_inc [6];
  logic        voice_en  [6];
  logic [7:0]  ctom;
  logic signed [15:0] sample_out, prev_out;
  int checks = 0, failures = 0;
  longint cyc = 0;          // clocks since reset release
  int change_phase = -1;
  int changes = 0;
  fm_model m;

  fm_synth dut (.clk(clk), .rst(rst), .theta_inc(theta_inc), .voice_en(voice_en),
                .ctom(ctom), .sample_out(sample_out));

  always #5 clk = ~clk;

  initial begin
    repeat (2_000_000) @(posedge clk);
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

  // output may only change at one phase of the sample period
  always @(posedge clk) begin
    if (!rst) begin
      cyc++;
      #1;
      if (sample_out != prev_out) begin
        changes++;
        if (change_phase < 0) change_phase = int'(cyc % PERIOD);
        else check(int'(cyc % PERIOD) == change_phase,
                   $sformatf("output changed at phase %0d", cyc % PERIOD));
      end
      prev_out = sample_out;
    end
  end

  initial begin
    bit [31:0] inc [6];
    bit        en  [6];
    int        codes [11] = '{0, 1, 2, 3, 4, 5, 6, 7, 8, 9, 12};
    shortint   y;
    m = new();
    m.clear();
    rst = 1; ctom = 0; prev_out = 0;
    foreach (theta_inc[v]) begin theta_inc[v] = 0; voice_en[v] = 0; end
    repeat (4) @(posedge clk);
    @(negedge clk); rst = 0;
    // now at phase 0 of period 0; move to phase 100
    repeat (100) @(posedge clk);
    for (int c = 0; c < 11; c++) begin
      for (int s = 0; s < 12; s++) begin
        // phase ~100 of a period: set the inputs for the next pass
        @(negedge clk);
        if (s == 0 || ($urandom % 4) == 0) begin
          foreach (inc[v]) begin
            inc[v] = 32'(702 + $urandom % 300000);
            en[v]  = ($urandom % 3) != 0;
          end
        end
        ctom = 8'(codes[c]);
        foreach (inc[v]) begin theta_inc[v] = inc[v]; voice_en[v] = en[v]; end
        // the model for the pass already done with the previous inputs is
        // in step; this period's pass uses the new ones
        repeat (PERIOD) @(posedge clk);
        #1;
        y = m.next(inc, en, codes[c]);
        check(sample_out == y, $sformatf("ctom=%0d s=%0d got %0d exp %0d",
                                         codes[c], s, sample_out, y));
      end
    end
    check(changes > 50, $sformatf("only %0d output changes", changes));
    $display("output updates at phase %0d of each %0d-clock period", change_phase, PERIOD);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
