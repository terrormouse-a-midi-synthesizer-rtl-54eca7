// tb_delayline: random reads and writes against an array model, checking
// the one-clock read latency, read-before-write and hold with en low.
module tb_delayline;
  logic        clk = 0;
  logic        en, we;
  logic [7:0]  addr;
  logic [15:0] din, dout;
  int checks = 0, failures = 0;
  logic [15:0] model [256];
  logic [15:0] expect_q;
  bit          expect_v;

  delayline dut (.clk(clk), .en(en), .we(we), .addr(addr), .data_in(din), .data_out(dout));

  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    en = 0; we = 0; addr = 0; din = 0; expect_v = 0;
    // fill the memory first
    for (int i = 0; i < 256; i++) begin
      @(negedge clk); en = 1; we = 1; addr = 8'(i); din = 16'($urandom); model[i] = din;
    end
    @(negedge clk); en = 0; we = 0;
    for (int t = 0; t < 4000; t++) begin
      @(negedge clk);
      if (expect_v) begin
        checks++;
        if (dout !== expect_q) begin
          failures++;
          if (failures < 10) $display("ERR t=%0d dout=%h exp=%h", t, dout, expect_q);
        end
      end
      en   = ($urandom % 4) != 0;
      we   = ($urandom % 2) != 0;
      addr = 8'($urandom);
      din  = 16'($urandom);
      if (en) begin
        expect_q = model[addr];          // read-first
        expect_v = 1;
        if (we) model[addr] = din;
      end
      // with en low the output holds the last read
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
