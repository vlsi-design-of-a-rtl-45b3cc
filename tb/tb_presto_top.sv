// tb_presto_top: end-to-end testbench of presto_top at its default sizes
// (32-bit PRPG, 32 scan chains, 32 shift and 32 initialization cycles per
// pattern, 8-bit low-power LFSR).
//
// The PRESTO generator is taken through a complete test session: plain PRPG
// patterns, low-toggling LBIST patterns with random hold and toggle periods,
// decompressor patterns fed with random tester data (with and without hold
// periods), and switches between the modes. Every cycle the outputs are
// compared with the reference model of presto_ref_pkg. Scan chains that stay
// constant over a whole pattern are counted from the outputs. Meanwhile the
// low-power LFSR runs on its own, and its output is compared with a reference
// LFSR and the AND/OR intermediate vectors.
//
// Each mechanism must occur at least once, or a failure is counted: plain
// PRPG (switching code 0), control register reload, hold period, toggle
// period, scan chain constant for a whole pattern, LBIST-to-decompressor and
// decompressor-to-LBIST mode switches, first-cycle latch reload, tester data
// injection, No Hold pattern, decompressor period counter expiry, stalled
// (start low) cycles, low-power intermediate vector and LFSR seed load.
module tb_presto_top;
  import presto_pkg::*;
  import presto_ref_pkg::*;

  logic        clk = 1'b0;
  logic        rst, start, in, cfg_we, t_init;
  presto_cfg_t cfg_in;
  code_t       offset;
  logic [31:0] out;
  logic        scan_en, pattern_out_end, toggle_mode;
  logic        lp_load, lp_en, lp_is_inter;
  logic [7:0]  lp_seed, lp_out;
  int checks = 0, failures = 0;

  presto_top dut (.clk, .rst, .start, .in, .cfg_we, .cfg_in, .t_init, .offset,
                  .out, .scan_en, .pattern_out_end, .toggle_mode,
                  .lp_load, .lp_seed, .lp_en, .lp_out, .lp_is_inter);

  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  typedef enum int {
    EV_PLAIN, EV_RELOAD, EV_HOLD, EV_TOGGLE, EV_STILL_CHAIN, EV_TO_DECOMP, EV_TO_LBIST,
    EV_FIRST_CYCLE, EV_INJECT, EV_NO_HOLD, EV_COUNTER_EXPIRY, EV_STALL, EV_INTERMEDIATE,
    EV_SEED_LOAD, EV_N
  } event_e;
  int ev [EV_N];
  string ev_name [EV_N] = '{"plain PRPG", "control register reload", "hold period",
    "toggle period", "scan chain constant for a pattern", "switch to decompressor",
    "switch to LBIST", "first-cycle reload", "tester injection", "No Hold pattern",
    "period counter expiry", "stall", "intermediate vector", "seed load"};

  presto_ref   m;
  logic [31:0] first_word, changed;
  bit          in_pattern;
  bit          prev_teff;
  // low-power LFSR model
  logic [7:0]  lq;
  bit          lphase;

  function automatic logic [7:0] lnext(logic [7:0] s);
    return {s[6:0], s[7] ^ s[5] ^ s[4] ^ s[3]};
  endfunction

  function automatic logic [7:0] lmid(logic [7:0] a, logic [7:0] b);
    logic [7:0] r;
    for (int i = 0; i < 8; i++) r[i] = (i % 2 == 1) ? (a[i] | b[i]) : (a[i] & b[i]);
    return r;
  endfunction

  task automatic cycle(bit st, bit ate, bit we = 0, presto_cfg_t c = '0);
    logic [7:0] lexp;
    start = st; in = ate; cfg_we = we; cfg_in = c;
    t_init = 1'($urandom); offset = code_t'($urandom);
    lp_en = $urandom_range(0, 7) != 0;
    lp_load = $urandom_range(0, 200) == 0;
    lp_seed = 8'($urandom_range(1, 255));
    #1;
    m.eval();
    // PRESTO generator against the model
    checks++;
    if (out !== m.ps || scan_en !== m.scan_en || pattern_out_end !== m.pend_out ||
        toggle_mode !== m.teff) begin
      failures++;
      if (failures < 10)
        $display("%0t: out %h/%h scan_en %b/%b end %b/%b toggle %b/%b", $time, out, m.ps,
                 scan_en, m.scan_en, pattern_out_end, m.pend_out, toggle_mode, m.teff);
    end
    // scan chains constant over a whole pattern
    if (scan_en) begin
      if (!in_pattern) begin first_word = out; changed = '0; in_pattern = 1; end
      changed |= out ^ first_word;
      if (pattern_out_end) begin
        if (~changed != 0) ev[EV_STILL_CHAIN]++;
        in_pattern = 0;
      end
    end
    // mechanisms
    if (st) begin
      if (m.lp_off) ev[EV_PLAIN]++;
      if (m.reload) ev[EV_RELOAD]++;
      if (m.first) ev[EV_FIRST_CYCLE]++;
      if (m.mode && ate) ev[EV_INJECT]++;
      if (m.mode && m.in_shift && m.hd == 0) ev[EV_NO_HOLD]++;
      if (m.mode && m.tin) ev[EV_COUNTER_EXPIRY]++;
      if (prev_teff && !m.teff) ev[EV_HOLD]++;
      if (!prev_teff && m.teff) ev[EV_TOGGLE]++;
      prev_teff = m.teff;
    end else ev[EV_STALL]++;
    if (we && c.mode != m.mode) ev[c.mode ? EV_TO_DECOMP : EV_TO_LBIST]++;
    // low-power LFSR against its model
    lexp = lphase ? lmid(lq, lnext(lq)) : lq;
    checks++;
    if (lp_out !== lexp || lp_is_inter !== lphase) begin
      failures++; $display("%0t: lp_out %h/%h", $time, lp_out, lexp);
    end
    if (lp_en && lphase) ev[EV_INTERMEDIATE]++;
    if (lp_load) begin ev[EV_SEED_LOAD]++; lq = lp_seed; lphase = 0; end
    else if (lp_en) begin
      if (lphase) lq = lnext(lq);
      lphase = ~lphase;
    end
    m.step(st, ate, we, c.mode, c.sw_code, c.toggle_code, c.hold_code, t_init, offset);
    @(negedge clk);
  endtask

  task automatic write_cfg(mode_e md, int sw, int tg, int hd);
    presto_cfg_t c;
    c.mode = md; c.sw_code = code_t'(sw); c.toggle_code = code_t'(tg); c.hold_code = code_t'(hd);
    cycle(0, 0, 1, c);
    in_pattern = 0;
  endtask

  initial begin
    m = new(32, 32);
    rst = 1; start = 0; in = 0; cfg_we = 0; cfg_in = '0; t_init = 0; offset = 0;
    lp_load = 0; lp_en = 0; lp_seed = 0;
    @(negedge clk); @(negedge clk);
    rst = 0;
    m.reset(); lq = 8'h01; lphase = 0; prev_teff = 1; in_pattern = 0;

    write_cfg(MODE_LBIST, 0, 0, 0);            // plain pseudorandom patterns
    repeat (32 * 10) cycle(1, 0);
    write_cfg(MODE_LBIST, 2, 6, 3);            // low toggling, random hold/toggle periods
    repeat (32 * 40) cycle($urandom_range(0, 9) != 0, 0);
    write_cfg(MODE_DECOMP, 8, 4, 6);           // decompressor
    repeat (64 * 20) cycle(1, 1'($urandom));
    write_cfg(MODE_DECOMP, 8, 3, 0);           // decompressor, No Hold
    repeat (64 * 10) cycle(1, 1'($urandom));
    write_cfg(MODE_LBIST, 9, 12, 2);           // back to LBIST
    repeat (32 * 20) cycle(1, 1'($urandom));

    for (int e = 0; e < EV_N; e++) begin
      $display("%-36s %0d", ev_name[e], ev[e]);
      checks++;
      if (ev[e] == 0) begin failures++; $display("mechanism never happened: %s", ev_name[e]); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
