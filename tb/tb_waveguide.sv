// tb_waveguide: Karplus-Strong voice against an array model of
// y[n] = -0.5*(y[n-N] + y[n-N-1]) seeded with the LFSR noise.
// Checks every output sample, that a sample is produced once per 2048 clocks,
// that the worst case (N = 255) finishes within the 2048-clock budget, that
// a disabled voice is silent and that reset reloads the excitation.
// A second instance with the positive loop gain (NEG_LOOP = 0) runs the same
// stimulus and is checked sample by sample against the model with the sign
// flipped.
module tb_waveguide;
  import synth_ref_pkg::*;
  localparam int PERIOD = 2048;
  localparam bit [15:0] SEED = 16'hACE1;

  logic clk = 0, rst;
  logic enable, reset;
  logic [7:0] length;
  logic signed [15:0] sample_out;
  logic busy;
  int checks = 0, failures = 0;
  int busy_len, max_busy = 0;
  longint cyc = 0, last_done = -1;
  ks_model m, mp;
  logic signed [15:0] pos_out;
  logic pos_busy;

  waveguide dut (.clk(clk), .rst(rst), .enable(enable), .reset(reset),
                 .length(length), .sample_out(sample_out), .busy(busy));

  waveguide #(.NEG_LOOP(1'b0)) dut_pos (.clk(clk), .rst(rst), .enable(enable), .reset(reset),
                 .length(length), .sample_out(pos_out), .busy(pos_busy));

  always #5 clk = ~clk;
  always @(posedge clk) cyc++;

  initial begin
    repeat (3_000_000) @(posedge clk);
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

  task automatic pluck(int n);
    @(negedge clk);
    length = 8'(n); enable = 1; reset = 1;
    @(negedge clk); @(negedge clk);
    reset = 0;
    m.load(n, SEED);
    mp.load(n, SEED);
  endtask

  // wait for one computed sample and compare it with the model
  task automatic one_sample(int n, bit check_period);
    shortint y;
    busy_len = 0;
    while (!busy) @(posedge clk);
    while (busy) begin @(posedge clk); busy_len++; end
    #1;
    y = m.next();
    check(sample_out == y, $sformatf("N=%0d got %0d exp %0d", n, sample_out, y));
    y = mp.next();
    check(pos_out == y, $sformatf("positive loop N=%0d got %0d exp %0d", n, pos_out, y));
    check(busy_len < PERIOD, $sformatf("busy %0d clocks", busy_len));
    if (busy_len > max_busy) max_busy = busy_len;
    if (check_period && last_done >= 0)
      check(cyc - last_done == PERIOD, $sformatf("period %0d", cyc - last_done));
    last_done = cyc;
  endtask

  initial begin
    m = new();
    mp = new();
    mp.neg = 0;
    rst = 1; enable = 0; reset = 0; length = 0;
    repeat (4) @(posedge clk);
    rst = 0;

    // short string: many trips round the loop
    pluck(5);
    last_done = -1;
    for (int i = 0; i < 60; i++) one_sample(5, 1);

    // worst case: the whole RAM
    pluck(255);
    last_done = -1;
    for (int i = 0; i < 300; i++) one_sample(255, 1);
    check(busy_len == 3 * 255 + 4, $sformatf("N=255 takes %0d clocks", busy_len));

    // A440 length from the key table
    pluck(56);
    last_done = -1;
    for (int i = 0; i < 400; i++) one_sample(56, 1);

    // disabled: silent and idle
    @(negedge clk); enable = 0;
    repeat (3 * PERIOD) begin
      @(posedge clk); #1;
      check(sample_out == 0 && !busy, "disabled voice not silent");
    end

    // enable again without reset: continues from the stored line
    @(negedge clk); enable = 1;
    last_done = -1;
    for (int i = 0; i < 20; i++) one_sample(56, 1);

    // N = 1, the shortest line
    pluck(1);
    last_done = -1;
    for (int i = 0; i < 10; i++) one_sample(1, 1);

    $display("max busy %0d clocks per sample", max_busy);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
