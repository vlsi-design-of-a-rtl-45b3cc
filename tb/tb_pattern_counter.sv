// tb_pattern_counter: self-checking testbench for pattern_counter.
//
// With the default lengths (32 shift cycles, 32 initialization cycles) it
// checks, cycle by cycle against a position counter kept here, that in LBIST
// mode every cycle shifts and a pattern ends (with a reload) every 32 run
// cycles, and that in decompressor mode a pattern is 32 idle initialization
// cycles whose last one raises first_cycle and reload, then 32 shift cycles.
// Run is gated randomly and restart is exercised. It also counts the cycles
// between pattern ends to check the pattern rate.
module tb_pattern_counter;
  logic clk = 1'b0;
  logic rst, run, restart, decomp;
  logic in_shift, reload, first_cycle, pattern_end;
  int checks = 0, failures = 0;
  int pos, since_end, ends;

  pattern_counter dut (.clk, .rst, .run, .restart, .decomp,
                       .in_shift, .reload, .first_cycle, .pattern_end);

  always #5 clk = ~clk;

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check_outputs();
    logic e_shift, e_reload, e_first, e_end;
    if (decomp) begin
      e_shift = pos >= 32; e_first = pos == 31; e_end = pos == 63; e_reload = e_first;
    end else begin
      e_shift = 1; e_first = 0; e_end = pos == 31; e_reload = e_end;
    end
    checks++;
    if ({in_shift, reload, first_cycle, pattern_end} !== {e_shift, e_reload, e_first, e_end}) begin
      failures++;
      $display("decomp %0d pos %0d: got %b%b%b%b", decomp, pos, in_shift, reload, first_cycle, pattern_end);
    end
  endtask

  task automatic run_mode(logic d, int cycles, bit gate);
    decomp = d; restart = 1;
    @(negedge clk);
    restart = 0; pos = 0; since_end = 0;
    for (int i = 0; i < cycles; i++) begin
      logic pe;
      run = gate ? ($urandom_range(0, 3) != 0) : 1'b1;
      #1 check_outputs();
      pe = pattern_end;
      @(negedge clk);
      if (run) begin
        since_end++;
        if (pe) begin
          checks++;
          if (since_end != (d ? 64 : 32)) begin failures++; $display("pattern length %0d", since_end); end
          since_end = 0; ends++;
        end
        pos = (pos == (d ? 63 : 31)) ? 0 : pos + 1;
      end
    end
  endtask

  initial begin
    rst = 1; run = 0; restart = 0; decomp = 0; ends = 0;
    @(negedge clk); @(negedge clk);
    rst = 0;
    run_mode(0, 300, 0);
    run_mode(1, 400, 0);
    run_mode(0, 500, 1);
    run_mode(1, 700, 1);
    // restart in the middle of a pattern
    run_mode(1, 40, 0);
    run_mode(1, 200, 0);
    checks++;
    if (ends < 20) begin failures++; $display("only %0d patterns", ends); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
