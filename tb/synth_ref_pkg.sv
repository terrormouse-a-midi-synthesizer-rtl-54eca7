// synth_ref_pkg: reference models used by the testbenches.
//
// These are written from the behaviour the design is meant to have, not from
// the RTL: the cosine table is computed with $cos, the Karplus-Strong loop is
// an array model of y[n] = -0.5*(y[n-N] + y[n-N-1]), and the FM voices are
// plain phase accumulators with a multiply-based ratio table.
package synth_ref_pkg;

  // round(32767 * cos(2*pi*i/256))
  function automatic shortint cos_ref(input int i);
    real x;
    x = 32767.0 * $cos(2.0 * 3.14159265358979 * real'(i % 256) / 256.0);
    return shortint'($rtoi(x >= 0.0 ? x + 0.5 : x - 0.5));
  endfunction

  // k-th word of the waveguide excitation: LFSR x^16+x^14+x^13+x^11+1
  // (shift left, new bit = b15^b13^b12^b10) from the seed, halved.
  function automatic shortint noise_word(input int k, input bit [15:0] seed);
    bit [15:0] l;
    l = seed;
    for (int i = 0; i < k; i++) l = {l[14:0], l[15] ^ l[13] ^ l[12] ^ l[10]};
    return shortint'($signed(l) >>> 1);
  endfunction

  // Modulator increment for the ratio code, as (multiple of w_c / 2)
  function automatic bit [31:0] mod_inc_ref(input int ctom, input bit [31:0] wc);
    longint unsigned w;
    w = longint'(wc);
    case (ctom)
      0: return 32'd0;
      1: return 32'h0F00;
      2: return 32'(w / 256);
      3, 4, 5, 6, 7, 8, 9: return 32'((w * longint'(ctom - 1)) / 2);
      default: return 32'd0;
    endcase
  endfunction

  class ks_model;
    shortint d[257];
    int      n;
    bit      neg = 1;     // loop gain -0.5 (1) or +0.5 (0)
    function void load(int len, bit [15:0] seed);
      n = len;
      for (int k = 0; k <= len; k++) d[k] = noise_word(k, seed);
    endfunction
    function shortint next();
      int s;
      shortint y;
      s = (int'(d[n-1]) >>> 1) + (int'(d[n]) >>> 1);
      if (neg) s = -s;
      if (s > 32767) s = 32767;
      y = shortint'(s);
      for (int k = n; k >= 1; k--) d[k] = d[k-1];
      d[0] = y;
      return y;
    endfunction
  endclass

  class fm_model;
    bit [31:0] thc[6];
    bit [31:0] thm[6];
    function void clear();
      foreach (thc[v]) begin thc[v] = 0; thm[v] = 0; end
    endfunction
    // One sample of the six-voice mix, sum / 8
    function shortint next(bit [31:0] inc[6], bit en[6], int ctom);
      int sum;
      sum = 0;
      for (int v = 0; v < 6; v++) begin
        shortint m, c;
        m = cos_ref(int'(thm[v][19:12]));
        c = cos_ref((int'(thc[v][19:12]) + int'(m >>> 8)) & 255);
        thm[v] += mod_inc_ref(ctom, inc[v]);
        thc[v] += inc[v];
        if (en[v]) sum += int'(c);
      end
      return shortint'(sum >>> 3);
    endfunction
  endclass

endpackage
