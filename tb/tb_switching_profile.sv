// tb_switching_profile: shows and checks the scan switching profile of the
// PRESTO generator over two test patterns, for the first 15 scan chains.
//
// The generator (presto_top at its default sizes) runs in LBIST mode with
// switching code 0010 (about 1/8 of the latches may toggle), Toggle code 0100
// and Hold code 0100 (periods of about four cycles). After one warm-up
// pattern, two patterns are recorded and printed, one row per chain and one
// character per shift word: '0' or '1' where the chain receives the same
// value as in the previous word, '~' where it changes. A header row marks the
// toggle (T) and hold (H) periods.
//
// Checks: every word produced after a hold-period cycle equals the word before
// it on all 32 chains; each recorded pattern has at least one hold period and
// one toggle period; in each pattern some, but not all, of the 15 chains stay
// constant for the whole pattern; and each pattern has 32 shift words.
module tb_switching_profile;
  import presto_pkg::*;

  localparam int CHAINS = 15;

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
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rst = 1; start = 0; in = 0; cfg_we = 0; cfg_in = '0; t_init = 0; offset = 0;
    lp_load = 0; lp_en = 0; lp_seed = 0;
    @(negedge clk); @(negedge clk);
    rst = 0;
    cfg_we = 1;
    cfg_in = '{mode: MODE_LBIST, sw_code: 4'b0010, toggle_code: 4'b0100, hold_code: 4'b0100};
    @(negedge clk);
    cfg_we = 0; start = 1;
  end

  // A word on out in cycle k+1 holds the latch contents set at the end of
  // cycle k-1; tm_qq is toggle_mode of that cycle.
  logic [31:0] out_q;
  logic        tm_q, tm_qq, se_q;
  int          hold_periods [2], toggle_periods [2], nwords [2];
  logic [31:0] first_word [2], changed [2];
  string       rows [CHAINS];
  string       hdr;

  always @(negedge clk) begin
    if (!rst) begin
      // hold property: the update at the end of a hold cycle leaves the latches
      // unchanged, so the word two cycles later equals the word one cycle later.
      if (se_q && scan_en && tm_qq == 1'b0) begin
        checks++;
        if (out !== out_q) begin failures++; $display("%0t: chains changed after a hold cycle", $time); end
      end
      out_q <= out; se_q <= scan_en; tm_qq <= tm_q; tm_q <= toggle_mode;
    end
  end

  initial begin
    int p;
    logic prev_tm;
    hdr = "";
    for (int c = 0; c < CHAINS; c++) rows[c] = "";
    @(negedge rst);
    wait (start);
    // skip the warm-up pattern
    @(negedge clk);
    while (!(scan_en && pattern_out_end)) @(negedge clk);
    @(negedge clk);
    for (p = 0; p < 2; p++) begin
      logic [31:0] prev;
      bit          first;
      first = 1; prev_tm = 1'bx;
      hold_periods[p] = 0; toggle_periods[p] = 0; nwords[p] = 0; changed[p] = '0;
      hdr = {hdr, "|"};
      for (int c = 0; c < CHAINS; c++) rows[c] = {rows[c], "|"};
      forever begin
        if (scan_en) begin
          nwords[p]++;
          if (first) begin first_word[p] = out; prev = out; end
          changed[p] |= out ^ first_word[p];
          hdr = {hdr, tm_qq ? "T" : "H"};
          if (first || tm_qq != prev_tm) begin
            if (tm_qq) toggle_periods[p]++; else hold_periods[p]++;
          end
          prev_tm = tm_qq;
          for (int c = 0; c < CHAINS; c++)
            rows[c] = {rows[c], (!first && out[c] != prev[c]) ? "~" : (out[c] ? "1" : "0")};
          prev = out; first = 0;
          if (pattern_out_end) break;
        end
        @(negedge clk);
      end
      @(negedge clk);
    end
    $display("period  %s", hdr);
    for (int c = 0; c < CHAINS; c++) $display("chain%2d %s", c, rows[c]);
    for (p = 0; p < 2; p++) begin
      int still;
      still = 0;
      for (int c = 0; c < CHAINS; c++) if (!changed[p][c]) still++;
      $display("pattern %0d: %0d words, %0d toggle periods, %0d hold periods, %0d of %0d chains constant",
               p + 1, nwords[p], toggle_periods[p], hold_periods[p], still, CHAINS);
      checks++;
      if (nwords[p] != 32) begin failures++; $display("pattern %0d has %0d words", p + 1, nwords[p]); end
      checks++;
      if (toggle_periods[p] < 1 || hold_periods[p] < 1) begin failures++; $display("no hold/toggle alternation"); end
      checks++;
      if (still < 1 || still >= CHAINS) begin failures++; $display("constant chains %0d", still); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
