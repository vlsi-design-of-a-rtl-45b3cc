// presto_ref_pkg: cycle-accurate reference model of the PRESTO generator for
// the testbenches. It is written independently of the RTL from the behaviour
// documented in presto.sv: 32-bit LFSR with taps 31, 21, 1, 0 and tester
// injection in decompressor mode, weighted logic V (switching code) and H
// (Toggle/Hold codes), shift and toggle control registers, pattern counting,
// T flip-flop with down counter and No Hold, hold latches and a registered
// phase shifter (taps j, j+11, j+23).
package presto_ref_pkg;

  typedef int taps_t [10];
  localparam taps_t REF_V = '{2, 5, 13, 9, 17, 26, 20, 24, 29, 31};
  localparam taps_t REF_H = '{4, 8, 19, 11, 22, 30, 1, 14, 25, 28};

  class presto_ref;
    int unsigned shift_len, init_len;
    bit [31:0] s, sr, tcr, h, ps;
    bit        mode;           // 1: decompressor
    bit [3:0]  sw, tg, hd;
    bit        t;
    bit [3:0]  cnt;
    int unsigned pc;
    bit        scan_en, pend_out;
    // values of the current cycle, valid after eval()
    bit        in_shift, first, pend, reload, teff, lp_off, tin;
    bit [31:0] en;

    function new(int unsigned shift_len = 32, int unsigned init_len = 32);
      this.shift_len = shift_len;
      this.init_len  = init_len;
      reset();
    endfunction

    function void reset();
      s = 32'h1; sr = '0; tcr = '1; h = '0; ps = '0;
      mode = 0; sw = 0; tg = 0; hd = 0;
      t = 1; cnt = 0; pc = 0; scan_en = 0; pend_out = 0;
    endfunction

    static function bit wl(bit [3:0] c, bit [31:0] st, taps_t taps);
      bit g0, g1, g2, g3;
      g0 = st[taps[0]];
      g1 = st[taps[1]] & st[taps[2]];
      g2 = st[taps[3]] & st[taps[4]] & st[taps[5]];
      g3 = st[taps[6]] & st[taps[7]] & st[taps[8]] & st[taps[9]];
      return (c[3] & g0) | (c[2] & g1) | (c[1] & g2) | (c[0] & g3);
    endfunction

    static function bit [31:0] shifter(bit [31:0] x);
      bit [31:0] y;
      for (int j = 0; j < 32; j++) y[j] = x[j] ^ x[(j + 11) % 32] ^ x[(j + 23) % 32];
      return y;
    endfunction

    // Combinational values of the current cycle.
    function void eval();
      if (mode) begin
        in_shift = pc >= init_len;
        first    = pc == init_len - 1;
        pend     = pc == init_len + shift_len - 1;
        reload   = first;
      end else begin
        in_shift = 1;
        first    = 0;
        pend     = pc >= shift_len - 1;
        reload   = pend;
      end
      if (mode) tin = in_shift && !first && cnt == 0;
      else      tin = wl(t ? tg : hd, s, REF_H);
      teff   = t | (mode && hd == 0);
      lp_off = sw == 0;
      en     = (lp_off || first) ? '1 : (teff ? tcr : '0);
    endfunction

    // One rising clock edge.
    function void step(bit start, bit ate, bit we, bit new_mode, bit [3:0] new_sw,
                       bit [3:0] new_tg, bit [3:0] new_hd, bit t_init, bit [3:0] offset);
      bit sr_in, fb;
      eval();
      sr_in    = mode ? s[31] : wl(sw, s, REF_V);
      ps       = shifter(h);
      scan_en  = start && in_shift;
      pend_out = start && pend;
      if (start) begin
        fb = s[31] ^ s[21] ^ s[1] ^ s[0] ^ (mode & ate);
        h  = (s & en) | (h & ~en);
        if (reload) tcr = sr;
        sr = {sr[30:0], sr_in};
        if (mode) begin
          if (first) begin t = t_init; cnt = offset; end
          else if (in_shift) begin
            if (tin) begin cnt = t ? hd : tg; t = ~t; end
            else cnt = cnt - 1;
          end
        end else t = t ^ tin;
        s  = {s[30:0], fb};
        if (!we) pc = pend ? 0 : pc + 1;
      end
      if (we) begin
        mode = new_mode; sw = new_sw; tg = new_tg; hd = new_hd; pc = 0;
      end
    endfunction
  endclass

endpackage
