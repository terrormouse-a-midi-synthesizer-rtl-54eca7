// tb_cosine_rom: every table word against 32767*cos(2*pi*i/256) computed
// with $cos, plus the one-clock latency and hold with en low.
module tb_cosine_rom;
  import synth_ref_pkg::*;
  logic clk = 0;
  logic en;
  logic [7:0] theta;
  logic signed [15:0] cosine;
  int checks = 0, failures = 0;

  cosine_rom dut (.clk(clk), .en(en), .theta(theta), .cosine(cosine));

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    en = 0; theta = 0;
    for (int i = 0; i < 256; i++) begin
      @(negedge clk); en = 1; theta = 8'(i);
      @(negedge clk); en = 0; theta = 8'(i + 77);
      checks++;
      if (cosine != cos_ref(i)) begin
        failures++;
        $display("ERR i=%0d got %0d exp %0d", i, cosine, cos_ref(i));
      end
      @(negedge clk);   // en low: must hold
      checks++;
      if (cosine != cos_ref(i)) begin
        failures++;
        $display("ERR hold i=%0d", i);
      end
    end
    // quarter-period symmetry points
    checks++; if (cos_ref(64) != 0 || cos_ref(128) != -32767) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
