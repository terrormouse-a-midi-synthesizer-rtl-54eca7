// tb_opb_synth: end-to-end test of the synthesizer peripheral at its
// default configuration.
//
// A behavioural model of the control program that runs on the host processor
// parses a MIDI byte stream (Note On, Note Off, Note On with velocity 0,
// Program Change), allocates the six voices of the selected engine and
// writes the peripheral's registers over OPB. The codec pins are decoded back
// into 16-bit words and compared with reference models of the waveguides and
// the FM voices (synth_ref_pkg), one expected sample per 2048-clock period.
//
// Scheduling: the peripheral's engines start a sample at phase 0 of every
// 2048-clock period (counted from reset); the codec loads words at phases
// 15, 527, 1039 and 1551. The control program only writes during phases
// 1560..~1800, so the words loaded at 1039 and 1551 of period k both carry
// period k's finished sample, and must be equal (mono) and match the model.
//
// Every mechanism is counted and must occur: waveguide and FM note on/off,
// Note On with velocity 0, all voices busy (note dropped), a key outside the
// waveguide range (dropped), program changes to every FM ratio code, switches
// of the synthesizer select both ways, and all-notes-off on program change.
module tb_opb_synth;
  import synth_ref_pkg::*;
  localparam int PERIOD = 2048;
  localparam real FS = 50.0e6 / 2048.0;
  localparam bit [15:0] SEED = 16'hACE1;   // waveguide noise seed

  logic        clk = 0, rst;
  logic [31:0] abus, dbus, sl_dbus;
  logic [3:0]  be;
  logic        rnw, sel, seq;
  logic        errack, retry, toutsup, xferack;
  logic        csn, bclk, mclk, lrck, sdti;

  opb_synth dut (
    .OPB_Clk(clk), .OPB_Rst(rst), .OPB_ABus(abus), .OPB_BE(be), .OPB_DBus(dbus),
    .OPB_RNW(rnw), .OPB_select(sel), .OPB_seqAddr(seq), .Sl_DBus(sl_dbus),
    .Sl_errAck(errack), .Sl_retry(retry), .Sl_toutSup(toutsup), .Sl_xferAck(xferack),
    .AU_CSN_N(csn), .AU_BCLK(bclk), .AU_MCLK(mclk), .AU_LRCK(lrck), .AU_SDTI(sdti));

  always #10 clk = ~clk;

  int checks = 0, failures = 0;
  longint cyc = 0;                  // posedges since reset release

  task automatic check(bit cond, string msg);
    checks++;
    if (!cond) begin
      failures++;
      if (failures < 20) $display("ERR %s", msg);
    end
  endtask

  initial begin
    repeat (2_000_000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d (watchdog)", checks, failures);
    $finish;
  end

  // ---------------------------------------------------------------- codec side
  logic [15:0] words [$];
  logic [15:0] cur;
  int nbits = -1;
  logic lrck_prev = 0, bclk_prev = 1;

  always @(posedge clk) begin
    #1;
    if (!rst) begin
      cyc++;
      if (lrck != lrck_prev) begin
        if (nbits == 16) words.push_back(cur);
        nbits = 0;
        cur = '0;
      end
      if (bclk && !bclk_prev && nbits >= 0) begin
        cur = {cur[14:0], sdti};
        nbits++;
      end
      bclk_prev = bclk; lrck_prev = lrck;
    end
  end

  // ---------------------------------------------------------------- bus side
  task automatic opb_write(bit [7:0] off, bit [31:0] d, bit is_byte);
    @(negedge clk);
    abus = 32'hFEFF0300 | 32'(off); rnw = 0; sel = 1;
    dbus = is_byte ? {4{d[7:0]}} : d;
    be   = is_byte ? 4'b1000 >> off[1:0] : 4'b1111;
    @(posedge clk); #1;
    check(xferack, $sformatf("no ack for offset %h", off));
    @(negedge clk);
    sel = 0; abus = 0; dbus = 0;
  endtask

  // ---------------------------------------------- shadow of the peripheral
  bit        s_wg_en [6];
  bit [7:0]  s_wg_len [6];
  bit        s_wg_loaded [6];
  bit        s_fm_en [6];
  bit [31:0] s_theta [6];
  int        s_mod = 0;
  bit        s_sel = 0;               // 0 = FM, 1 = waveguides
  ks_model   ks [6];
  fm_model   fm;

  // ------------------------------------- control program (behavioural model)
  int unsigned n_wg_on, n_wg_off, n_fm_on, n_fm_off, n_vel0_off, n_all_busy,
               n_out_of_range, n_prog, n_sel_to_fm, n_sel_to_wg, n_all_off;
  bit  mods_used [10];
  byte wgs [6];
  byte fms [6];
  int  status = 0, databytes = 0;
  byte data [2];
  int  fm_octave = 0;

  function automatic int key_len(int key);      // waveguide delay line length
    real f;
    f = 440.0 * (2.0 ** ((real'(key) - 69.0) / 12.0));
    return $rtoi(FS / f + 0.5);
  endfunction
  function automatic bit [31:0] key_theta(int key); // FM carrier increment
    real f;
    f = 440.0 * (2.0 ** ((real'(key) - 69.0) / 12.0));
    return 32'($rtoi(2.0 * f * 1048576.0 / FS));
  endfunction

  task automatic wg_on(int v, int key);
    opb_write(8'h12 + 8'(16 * v), 32'(key_len(key)), 1);
    opb_write(8'h10 + 8'(16 * v), 1, 1);
    opb_write(8'h11 + 8'(16 * v), 1, 1);
    opb_write(8'h11 + 8'(16 * v), 0, 1);
    s_wg_len[v] = 8'(key_len(key)); s_wg_en[v] = 1; s_wg_loaded[v] = 1;
    ks[v].load(key_len(key), SEED);
    n_wg_on++;
  endtask
  task automatic wg_off(int v);
    opb_write(8'h10 + 8'(16 * v), 0, 1);
    s_wg_en[v] = 0;
    n_wg_off++;
  endtask
  task automatic fm_on(int v, int key);
    opb_write(8'h72 + 8'(16 * v), key_theta(key), 0);
    opb_write(8'h70 + 8'(16 * v), 1, 1);
    s_theta[v] = key_theta(key); s_fm_en[v] = 1;
    n_fm_on++;
  endtask
  task automatic fm_off(int v);
    opb_write(8'h70 + 8'(16 * v), 0, 1);
    s_fm_en[v] = 0;
    n_fm_off++;
  endtask

  task automatic note_off_key(int key);
    for (int v = 0; v < 6; v++) begin
      if (s_sel == 0 && fms[v] == key) begin fms[v] = 0; fm_off(v); break; end
      if (s_sel == 1 && wgs[v] == key) begin wgs[v] = 0; wg_off(v); break; end
    end
  endtask

  task automatic midi_byte(byte b);
    if (b[7]) begin
      status = int'(b[7:4]); databytes = 0; data[0] = 0; data[1] = 0;
    end else begin
      data[databytes] = b; databytes++;
    end
    if (databytes == 2) begin
      int key, vel;
      bit placed;
      key = data[0]; vel = data[1]; placed = 0;
      if (status == 8) note_off_key(key);
      else if (status == 9) begin
        if (vel == 0) begin n_vel0_off++; note_off_key(key); end
        else if (s_sel == 0) begin
          for (int v = 0; v < 6 && !placed; v++)
            if (fms[v] == 0) begin fms[v] = byte'(key); fm_on(v, key - fm_octave); placed = 1; end
          if (!placed) n_all_busy++;
        end else if (key > 43 && key < 95) begin
          for (int v = 0; v < 6 && !placed; v++)
            if (wgs[v] == 0) begin wgs[v] = byte'(key); wg_on(v, key); placed = 1; end
          if (!placed) n_all_busy++;
        end else begin
          n_out_of_range++;
          note_off_key(key);
        end
      end
      databytes = 0;
    end else if (status == 12 && databytes == 1) begin
      int p;
      bit old_sel;
      p = data[0]; old_sel = s_sel;
      if (p == 0) s_sel = 1;
      else if (p <= 10) begin
        s_sel = 0; s_mod = p - 1; mods_used[p - 1] = 1;
        fm_octave = (p == 4 || p == 6 || p == 8 || p == 10) ? 12 : 0;
      end
      opb_write(8'hFF, 32'(s_sel), 1);
      opb_write(8'hF0, 32'(s_mod), 1);
      if (old_sel && !s_sel) n_sel_to_fm++;
      if (!old_sel && s_sel) n_sel_to_wg++;
      for (int v = 0; v < 6; v++) begin
        wgs[v] = 0; wg_off(v); fms[v] = 0; fm_off(v);
      end
      n_prog++; n_all_off++;
      databytes = 0;
    end
  endtask

  // ------------------------------------------------------ expected samples
  shortint expected [$];

  function automatic shortint model_period();
    int wsum;
    shortint f;
    bit [31:0] inc [6];
    bit        en [6];
    foreach (inc[v]) begin inc[v] = s_theta[v]; en[v] = s_fm_en[v]; end
    f = fm.next(inc, en, s_mod);
    wsum = 0;
    for (int v = 0; v < 6; v++)
      if (s_wg_en[v] && s_wg_loaded[v] && s_wg_len[v] != 0) wsum += int'(ks[v].next());
    return s_sel ? shortint'(wsum >>> 3) : f;
  endfunction

  // the stimulus: MIDI messages, each sent in one period's write window,
  // separated by a number of idle periods
  typedef struct { int gap; byte b0, b1, b2; int len; } msg_t;
  msg_t script [$];

  task automatic add(int gap, byte b0, byte b1, byte b2 = 0, int len = 3);
    msg_t m;
    m.gap = gap; m.b0 = b0; m.b1 = b1; m.b2 = b2; m.len = len;
    script.push_back(m);
  endtask

  initial begin
    int k = 0;
    for (int v = 0; v < 6; v++) begin ks[v] = new(); wgs[v] = 0; fms[v] = 0; end
    fm = new(); fm.clear();
    rst = 1; abus = 0; dbus = 0; be = 0; rnw = 1; sel = 0; seq = 0;

    // waveguides
    add(2, 8'hC0, 8'h00, 0, 2);            // program 0: waveguides
    add(1, 8'h90, 8'd60, 8'd64);
    add(6, 8'h90, 8'd64, 8'd64);
    add(6, 8'h90, 8'd67, 8'd64);
    add(6, 8'h90, 8'd30, 8'd64);           // below the waveguide range
    add(1, 8'h90, 8'd69, 8'd64);
    add(4, 8'h90, 8'd44, 8'd64);           // longest line used
    add(4, 8'h90, 8'd94, 8'd64);           // shortest line used: six voices busy
    add(8, 8'h90, 8'd72, 8'd64);           // no voice free
    add(8, 8'h80, 8'd64, 8'd0);            // Note Off
    add(6, 8'h90, 8'd67, 8'd0);            // Note On, velocity 0
    add(10, 8'h90, 8'd76, 8'd64);
    // FM programs 1..10
    for (int p = 1; p <= 10; p++) begin
      add(10, 8'hC0, byte'(p), 0, 2);
      add(1, 8'h90, byte'(48 + 2 * p), 8'd64);
      add(4, 8'h90, byte'(60 + p), 8'd64);
      if (p == 3) begin
        for (int n = 0; n < 5; n++) add(1, 8'h90, byte'(70 + n), 8'd64);  // 7 notes
        add(3, 8'h80, 8'd70, 8'd0);
        add(3, 8'h90, 8'd71, 8'd0);
      end
      if (p == 9) begin                    // keyboard ends, 3.5x ratio, no shift
        add(4, 8'h90, 8'd36, 8'd64);
        add(4, 8'h90, 8'd96, 8'd64);
      end
    end
    add(10, 8'hC0, 8'h00, 0, 2);           // back to waveguides
    add(1, 8'h90, 8'd50, 8'd64);
    add(30, 8'hC0, 8'd3, 0, 2);            // and to FM again
    add(1, 8'h90, 8'd57, 8'd64);
    add(10, 8'h90, 8'd57, 8'd0);

    repeat (4) @(posedge clk);
    @(negedge clk); rst = 0;

    // period loop; cyc counts posedges since reset, period k starts at 2048k+1
    foreach (script[i]) begin
      for (int g = 0; g < script[i].gap; g++) begin
        expected.push_back(model_period());
        wait (cyc == longint'(PERIOD) * k + 1560);
        k++;
        if (g == script[i].gap - 1) begin
          midi_byte(script[i].b0);
          midi_byte(script[i].b1);
          if (script[i].len == 3) midi_byte(script[i].b2);
          check(cyc < longint'(PERIOD) * (k - 1) + 1790, "write window overrun");
        end
        wait (cyc == longint'(PERIOD) * k + 1);
      end
    end
    for (int g = 0; g < 10; g++) begin
      expected.push_back(model_period());
      k++;
      wait (cyc == longint'(PERIOD) * k + 1);
    end
    wait (cyc == longint'(PERIOD) * k + 1600);

    // compare: words 4k+2 and 4k+3 carry period k's sample
    begin
      int nonzero = 0;
      for (int p = 1; p < expected.size(); p++) begin
        if (4 * p + 3 >= words.size()) break;
        check(words[4 * p + 2] == words[4 * p + 3], $sformatf("period %0d: left/right differ", p));
        check(shortint'(words[4 * p + 2]) == expected[p],
              $sformatf("period %0d: codec word %0d, model %0d", p,
                        shortint'(words[4 * p + 2]), expected[p]));
        if (expected[p] != 0) nonzero++;
      end
      check(nonzero > expected.size() / 2, $sformatf("only %0d audible periods", nonzero));
      $display("%0d periods compared, %0d audible", expected.size(), nonzero);
    end

    // every mechanism must have happened
    check(n_wg_on > 0,        "no waveguide note on");
    check(n_wg_off > 0,       "no waveguide note off");
    check(n_fm_on > 0,        "no FM note on");
    check(n_fm_off > 0,       "no FM note off");
    check(n_vel0_off > 0,     "no velocity-0 note off");
    check(n_all_busy > 0,     "voices never all busy");
    check(n_out_of_range > 0, "no out-of-range key");
    check(n_sel_to_fm > 0,    "never switched to FM");
    check(n_sel_to_wg > 0,    "never switched to waveguides");
    check(n_all_off > 0,      "no all-notes-off");
    foreach (mods_used[m]) check(mods_used[m], $sformatf("ratio code %0d never used", m));
    $display("wg on %0d off %0d, fm on %0d off %0d, vel0 %0d, all busy %0d, out of range %0d",
             n_wg_on, n_wg_off, n_fm_on, n_fm_off, n_vel0_off, n_all_busy, n_out_of_range);
    $display("program changes %0d (to FM %0d, to waveguides %0d)", n_prog, n_sel_to_fm, n_sel_to_wg);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
