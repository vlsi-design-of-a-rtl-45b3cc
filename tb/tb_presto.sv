// tb_presto: self-checking testbench for the PRESTO generator.
//
// Every cycle the scan chain word, scan_en, pattern_out_end and toggle_mode
// are compared with the cycle-accurate reference model of presto_ref_pkg,
// over LBIST runs with several switching/Toggle/Hold codes, randomly gated
// start, decompressor patterns with random tester data, offsets and initial
// T values, No Hold, and mode switches. On top of the exact comparison it
// checks statistical properties: the density of 1s in the toggle control
// register follows the switching code (1/2 for code 1000, 1/16 for 0001),
// the low-power settings lower the scan chain toggling well below the plain
// PRPG's, and in decompressor mode every pattern has exactly 32 shift words.
module tb_presto;
  import presto_pkg::*;
  import presto_ref_pkg::*;

  logic        clk = 1'b0;
  logic        rst, start, in, cfg_we, t_init;
  presto_cfg_t cfg_in;
  code_t       offset;
  logic [31:0] out;
  logic        scan_en, pattern_out_end, toggle_mode;
  int checks = 0, failures = 0;

  presto dut (.clk, .rst, .start, .in, .cfg_we, .cfg_in, .t_init, .offset,
              .out, .scan_en, .pattern_out_end, .toggle_mode);

  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  presto_ref m;
  logic [31:0] last_word;
  bit          have_last;
  int          words, flips, pat_words;
  real         tcr_ones;
  int          tcr_samples;

  // One clock cycle: compare, then advance DUT and model together.
  task automatic cycle(bit st, bit ate, bit we = 0, presto_cfg_t c = '0);
    start = st; in = ate; cfg_we = we; cfg_in = c;
    t_init = 1'($urandom); offset = code_t'($urandom);
    #1;
    m.eval();
    checks++;
    if (out !== m.ps || scan_en !== m.scan_en || pattern_out_end !== m.pend_out ||
        toggle_mode !== m.teff) begin
      failures++;
      if (failures < 10)
        $display("%0t: out %h/%h scan_en %b/%b end %b/%b toggle %b/%b", $time, out, m.ps,
                 scan_en, m.scan_en, pattern_out_end, m.pend_out, toggle_mode, m.teff);
    end
    if (scan_en) begin
      if (have_last) begin flips += $countones(out ^ last_word); words++; end
      last_word = out; have_last = 1;
      pat_words++;
      if (pattern_out_end) begin
        if (m.mode) begin
          checks++;
          if (pat_words != 32) begin failures++; $display("pattern of %0d words", pat_words); end
        end
        pat_words = 0;
      end
    end
    if (m.reload && st) begin tcr_ones += real'($countones(m.sr)); tcr_samples++; end
    m.step(st, ate, we, c.mode, c.sw_code, c.toggle_code, c.hold_code, t_init, offset);
    @(negedge clk);
  endtask

  task automatic write_cfg(mode_e md, int sw, int tg, int hd);
    presto_cfg_t c;
    c.mode = md; c.sw_code = code_t'(sw); c.toggle_code = code_t'(tg); c.hold_code = code_t'(hd);
    cycle(0, 0, 1, c);
    have_last = 0; words = 0; flips = 0; pat_words = 0; tcr_ones = 0; tcr_samples = 0;
  endtask

  function automatic real activity();
    return real'(flips) / real'(words * 32);
  endfunction

  initial begin
    real plain, lowp, dens;
    m = new(32, 32);
    rst = 1; start = 0; in = 0; cfg_we = 0; cfg_in = '0; t_init = 0; offset = 0;
    @(negedge clk); @(negedge clk);
    rst = 0;
    m.reset();

    // Plain PRPG (switching code 0): every latch transparent.
    write_cfg(MODE_LBIST, 0, 0, 0);
    repeat (2000) cycle(1, 0);
    plain = activity();
    $display("plain activity %f", plain);
    checks++;
    if (plain < 0.4 || plain > 0.6) begin failures++; $display("plain activity %f", plain); end

    // Switching code 1000: control register density about 1/2.
    write_cfg(MODE_LBIST, 8, 0, 0);
    repeat (3200) cycle(1, 0);
    dens = tcr_ones / real'(tcr_samples * 32);
    $display("density code 8: %f", dens);
    checks++;
    if (dens < 0.4 || dens > 0.6) begin failures++; $display("density %f", dens); end

    // Switching code 0001 with hold periods: low toggling.
    write_cfg(MODE_LBIST, 1, 8, 1);
    repeat (6400) cycle(1, 0);
    dens = tcr_ones / real'(tcr_samples * 32);
    lowp = activity();
    $display("density code 1: %f, activity %f", dens, lowp);
    checks++;
    if (dens < 0.02 || dens > 0.12) begin failures++; $display("density %f", dens); end
    checks++;
    if (lowp > plain / 3.0) begin failures++; $display("low power activity %f", lowp); end

    // Random codes and gated start.
    write_cfg(MODE_LBIST, 6, 3, 5);
    repeat (2000) cycle($urandom_range(0, 3) != 0, 1'($urandom));

    // Decompressor mode with random tester data.
    write_cfg(MODE_DECOMP, 8, 3, 5);
    repeat (64 * 20) cycle(1, 1'($urandom));
    write_cfg(MODE_DECOMP, 4, 2, 0);        // No Hold
    repeat (64 * 10) cycle(1, 1'($urandom));
    write_cfg(MODE_DECOMP, 0, 0, 15);      // switching code 0: all latches transparent
    repeat (64 * 10) cycle($urandom_range(0, 4) != 0, 1'($urandom));

    // Back to LBIST, then a mid-pattern reprogramming.
    write_cfg(MODE_LBIST, 12, 10, 2);
    repeat (1000) cycle(1, 1'($urandom));
    repeat (50) cycle(1, 0);
    write_cfg(MODE_DECOMP, 10, 5, 1);
    repeat (500) cycle(1, 1'($urandom));

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
