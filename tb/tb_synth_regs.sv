// tb_synth_regs: OPB writes to every register of the map, byte lane
// handling, acknowledge timing (one clock after the cycle is claimed, never
// two clocks running), and that writes outside the window or to unused
// offsets change nothing.
module tb_synth_regs;
  import synth_pkg::*;
  logic        clk = 0, rst;
  logic [31:0] abus, dbus, sl_dbus;
  logic [3:0]  be;
  logic        rnw, sel, seq;
  logic        errack, retry, toutsup, xferack;
  logic        wg_en [6], wg_rst [6], fm_en [6];
  logic [7:0]  wg_len [6];
  logic [31:0] fm_theta [6];
  logic [3:0]  fm_mod;
  synth_sel_e  synth_sel;
  int checks = 0, failures = 0;

  // expected register contents
  bit        e_wg_en [6], e_wg_rst [6], e_fm_en [6];
  bit [7:0]  e_wg_len [6];
  bit [31:0] e_theta [6];
  bit [3:0]  e_mod;
  bit        e_sel;

  synth_regs dut (
    .OPB_Clk(clk), .OPB_Rst(rst), .OPB_ABus(abus), .OPB_BE(be), .OPB_DBus(dbus),
    .OPB_RNW(rnw), .OPB_select(sel), .OPB_seqAddr(seq), .Sl_DBus(sl_dbus),
    .Sl_errAck(errack), .Sl_retry(retry), .Sl_toutSup(toutsup), .Sl_xferAck(xferack),
    .wg_en(wg_en), .wg_rst(wg_rst), .wg_len(wg_len), .fm_en(fm_en),
    .fm_theta(fm_theta), .fm_mod(fm_mod), .synth_sel(synth_sel));

  always #10 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
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

  // one bus cycle; a byte store is replicated on all four lanes
  // one bus cycle; a byte store is replicated on all four lanes. The select
  // is presented for one clock; the acknowledge must come in the next one.
  task automatic opb_write(bit [31:0] a, bit [31:0] d, bit is_byte, bit expect_ack);
    @(negedge clk);
    abus = a; rnw = 0; sel = 1;
    dbus = is_byte ? {4{d[7:0]}} : d;
    be   = is_byte ? 4'b1000 >> a[1:0] : 4'b1111;
    check(!xferack, "ack before the cycle");
    @(posedge clk); #1;
    check(xferack == expect_ack, $sformatf("ack=%0d for %h", xferack, a));
    @(negedge clk);
    sel = 0; abus = 0; dbus = 0;
    @(posedge clk); #1;
    check(!xferack, "ack held for two clocks");
  endtask

  task automatic compare_all(string when);
    for (int v = 0; v < 6; v++) begin
      check(wg_en[v] == e_wg_en[v] && wg_rst[v] == e_wg_rst[v] && wg_len[v] == e_wg_len[v],
            $sformatf("%s: waveguide %0d regs", when, v));
      check(fm_en[v] == e_fm_en[v] && fm_theta[v] == e_theta[v],
            $sformatf("%s: fm %0d regs", when, v));
    end
    check(fm_mod == e_mod && synth_sel == synth_sel_e'(e_sel), $sformatf("%s: FM_MOD/SYNTH_SEL", when));
    check(sl_dbus == 0 && !errack && !retry && !toutsup, "idle slave outputs");
  endtask

  initial begin
    rst = 1; abus = 0; dbus = 0; be = 0; rnw = 1; sel = 0; seq = 0;
    repeat (3) @(posedge clk);
    @(negedge clk); rst = 0;
    compare_all("after reset");
    for (int round = 0; round < 40; round++) begin
      int kind, v;
      bit [31:0] d;
      kind = $urandom % 9;
      v    = $urandom % 6;
      d    = $urandom;
      case (kind)
        0: begin opb_write(32'hFEFF0310 + 32'(16*v), d, 1, 1); e_wg_en[v]  = d[0]; end
        1: begin opb_write(32'hFEFF0311 + 32'(16*v), d, 1, 1); e_wg_rst[v] = d[0]; end
        2: begin opb_write(32'hFEFF0312 + 32'(16*v), d, 1, 1); e_wg_len[v] = d[7:0]; end
        3: begin opb_write(32'hFEFF0370 + 32'(16*v), d, 1, 1); e_fm_en[v]  = d[0]; end
        4: begin opb_write(32'hFEFF0372 + 32'(16*v), d, 0, 1); e_theta[v]  = d; end
        5: begin opb_write(32'hFEFF03F0, d, 1, 1); e_mod = d[3:0]; end
        6: begin opb_write(32'hFEFF03FF, d, 1, 1); e_sel = d[0]; end
        7: opb_write(32'hFEFF0200 + 32'(16*v), d, 1, 0);   // LED peripheral: not ours
        default: opb_write(32'hFEFF0300 + 32'($urandom % 16), d, 0, 1);   // unused offsets
      endcase
      compare_all($sformatf("round %0d kind %0d", round, kind));
    end
    // every register once, deterministically
    for (int v = 0; v < 6; v++) begin
      opb_write(32'hFEFF0312 + 32'(16*v), 32'(v + 40), 1, 1); e_wg_len[v] = 8'(v + 40);
      opb_write(32'hFEFF0310 + 32'(16*v), 1, 1, 1);           e_wg_en[v]  = 1;
      opb_write(32'hFEFF0311 + 32'(16*v), 1, 1, 1);           e_wg_rst[v] = 1;
      opb_write(32'hFEFF0372 + 32'(16*v), 32'h1000 * (v + 1), 0, 1); e_theta[v] = 32'h1000 * (v + 1);
      opb_write(32'hFEFF0370 + 32'(16*v), 1, 1, 1);           e_fm_en[v]  = 1;
    end
    opb_write(32'hFEFF03F0, 7, 1, 1); e_mod = 7;
    opb_write(32'hFEFF03FF, 1, 1, 1); e_sel = 1;
    compare_all("all set");
    // a read is acknowledged and changes nothing
    @(negedge clk); abus = 32'hFEFF0312; rnw = 1; sel = 1;
    @(posedge clk); #1;
    check(xferack && sl_dbus == 0, "read cycle");
    @(negedge clk); sel = 0;
    compare_all("after read");
    // a held select gives one acknowledge every other clock
    @(negedge clk); abus = 32'hFEFF03F0; rnw = 0; sel = 1; dbus = {4{8'd3}};
    begin
      int acks = 0;
      repeat (10) begin @(posedge clk); #1; if (xferack) acks++; end
      check(acks == 5, $sformatf("%0d acks in 10 clocks", acks));
    end
    @(negedge clk); sel = 0; e_mod = 3;
    @(posedge clk);
    compare_all("burst");
    @(negedge clk); rst = 1; @(negedge clk); rst = 0;
    check(wg_en[0] == 0 && fm_theta[5] == 0 && fm_mod == 0 && synth_sel == SEL_FM, "reset clears");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
