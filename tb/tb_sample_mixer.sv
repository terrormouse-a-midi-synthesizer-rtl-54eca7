// tb_sample_mixer: random waveguide and FM samples, both select settings,
// including all-full-scale inputs that would overflow a 16-bit adder.
module tb_sample_mixer;
  import synth_pkg::*;
  logic clk = 0, rst;
  sample_t wg [6];
  sample_t fm, out;
  synth_sel_e sel;
  int checks = 0, failures = 0;

  sample_mixer dut (.clk(clk), .rst(rst), .wg_sample(wg), .fm_sample(fm),
                    .synth_sel(sel), .sample_out(out));

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d (watchdog)", checks, failures);
    $finish;
  end

  initial begin
    int sum, expv;
    rst = 1; fm = 0; sel = SEL_FM;
    foreach (wg[v]) wg[v] = 0;
    repeat (3) @(posedge clk);
    @(negedge clk); rst = 0;
    for (int t = 0; t < 3000; t++) begin
      @(negedge clk);
      sel = ($urandom % 2) ? SEL_WG : SEL_FM;
      fm  = sample_t'($urandom);
      case (t % 3)
        0: foreach (wg[v]) wg[v] = 16'sh7FFF;
        1: foreach (wg[v]) wg[v] = 16'sh8000;
        default: foreach (wg[v]) wg[v] = sample_t'($urandom);
      endcase
      sum = 0;
      foreach (wg[v]) sum += int'(wg[v]);
      expv = (sel == SEL_WG) ? (sum >>> 3) : int'(fm);
      @(posedge clk); #1;
      checks++;
      if (int'(out) != expv) begin
        failures++;
        if (failures < 10) $display("ERR t=%0d sel=%0d got %0d exp %0d", t, sel, out, expv);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
