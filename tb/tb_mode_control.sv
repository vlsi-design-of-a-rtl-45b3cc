// tb_mode_control: self-checking testbench for mode_control.
//
// LBIST mode: with random PRPG bits and codes, the T flip-flop is compared
// every cycle with a model that toggles it when the weighted logic selected by
// the current period (Toggle code in toggle periods, Hold code in hold
// periods) outputs 1. The average period lengths for Toggle code 15 and Hold
// code 1 are checked against 1/p (p = 0.692 and 1/16).
// Decompressor mode: after each first_cycle pulse the sequence of T values
// over 40 shift cycles is compared with the one worked out from t_init,
// offset and the codes (first period offset+1 cycles, later periods code+1
// cycles), and Hold code 0000 must keep t_eff at 1 throughout.
module tb_mode_control;
  import presto_pkg::*;
  logic       clk = 1'b0;
  logic       rst, run, decomp, in_shift, first_cycle, t_init;
  code_t      toggle_code, hold_code, offset;
  logic [9:0] rnd;
  logic       t, t_eff, no_hold, tin;
  int checks = 0, failures = 0;

  mode_control dut (.clk, .rst, .run, .decomp, .in_shift, .first_cycle, .toggle_code,
                    .hold_code, .rnd, .t_init, .offset, .t, .t_eff, .no_hold, .tin);

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic wl(code_t c, logic [9:0] r);
    return (c[3] & r[0]) | (c[2] & r[1] & r[2]) | (c[1] & r[3] & r[4] & r[5]) |
           (c[0] & r[6] & r[7] & r[8] & r[9]);
  endfunction

  task automatic lbist_run(int cycles, bit stats);
    logic m_t;
    int tog_sum = 0, tog_n = 0, hold_sum = 0, hold_n = 0, len = 0;
    decomp = 0; in_shift = 1; first_cycle = 0;
    m_t = t;
    for (int i = 0; i < cycles; i++) begin
      logic sel_wl;
      run = stats ? 1'b1 : ($urandom_range(0, 3) != 0);
      rnd = 10'($urandom);
      if (!stats) begin toggle_code = code_t'($urandom); hold_code = code_t'($urandom); end
      #1;
      sel_wl = wl(m_t ? toggle_code : hold_code, rnd);
      checks++;
      if (tin !== sel_wl || t_eff !== m_t || no_hold !== 1'b0) begin
        failures++; $display("lbist %0d: tin %b/%b t_eff %b", i, tin, sel_wl, t_eff);
      end
      @(negedge clk);
      if (run) begin
        len++;
        if (sel_wl) begin
          if (m_t) begin tog_sum += len; tog_n++; end
          else     begin hold_sum += len; hold_n++; end
          len = 0;
        end
        m_t = m_t ^ sel_wl;
      end
      checks++;
      if (t !== m_t) begin failures++; $display("lbist %0d: t %b/%b", i, t, m_t); end
    end
    if (stats) begin
      real tm, hm;
      tm = real'(tog_sum) / real'(tog_n);
      hm = real'(hold_sum) / real'(hold_n);
      $display("mean toggle period %f, mean hold period %f", tm, hm);
      checks++;
      if (tm < 1.2 || tm > 1.8) begin failures++; $display("toggle mean %f", tm); end
      checks++;
      if (hm < 12.0 || hm > 20.0) begin failures++; $display("hold mean %f", hm); end
    end
  endtask

  task automatic decomp_pattern(logic ti, code_t off, code_t tc, code_t hc);
    logic e_t;
    int   left;
    decomp = 1; run = 1; toggle_code = tc; hold_code = hc;
    // a few initialization cycles, the last one with first_cycle
    in_shift = 0; first_cycle = 0; t_init = ti; offset = off;
    repeat (3) @(negedge clk);
    first_cycle = 1;
    @(negedge clk);
    first_cycle = 0; in_shift = 1; t_init = ~ti; offset = code_t'($urandom);
    e_t = ti; left = int'(off) + 1;
    for (int k = 0; k < 40; k++) begin
      rnd = 10'($urandom);
      #1;
      checks++;
      if (t !== e_t || t_eff !== (e_t | (hc == 0)) || no_hold !== (hc == 0)) begin
        failures++;
        $display("decomp ti %b off %0d tc %0d hc %0d cycle %0d: t %b exp %b t_eff %b",
                 ti, off, tc, hc, k, t, e_t, t_eff);
      end
      @(negedge clk);
      left--;
      if (left == 0) begin
        e_t  = ~e_t;
        left = e_t ? int'(tc) + 1 : int'(hc) + 1;
      end
    end
  endtask

  initial begin
    rst = 1; run = 0; decomp = 0; in_shift = 0; first_cycle = 0; t_init = 0;
    toggle_code = 0; hold_code = 0; offset = 0; rnd = 0;
    @(negedge clk); @(negedge clk);
    rst = 0;
    checks++;
    if (t !== 1'b1) begin failures++; $display("reset t"); end
    lbist_run(3000, 0);
    toggle_code = 4'd15; hold_code = 4'd1;
    lbist_run(20000, 1);
    decomp_pattern(1, 4'd2, 4'd3, 4'd5);
    decomp_pattern(0, 4'd0, 4'd1, 4'd0);
    decomp_pattern(0, 4'd7, 4'd0, 4'd2);
    for (int i = 0; i < 20; i++)
      decomp_pattern(1'($urandom), code_t'($urandom), code_t'($urandom), code_t'($urandom));
    // run low freezes the state
    begin
      logic keep;
      keep = t; run = 0;
      repeat (10) @(negedge clk);
      checks++;
      if (t !== keep) begin failures++; $display("run low changed t"); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
