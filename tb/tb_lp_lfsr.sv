// tb_lp_lfsr: self-checking testbench for lp_lfsr.
//
// Compares the output sequence T1, I1, T2, I2, ... with a reference 8-bit
// LFSR (x^8 + x^6 + x^5 + x^4 + 1, state bits 7, 5, 4, 3 feed bit 0) and the
// intermediate vector Ik[i] = OR or AND of Tk[i] and Tk+1[i] (OR on odd bits,
// AND on even bits). It checks that every intermediate bit equals the bit of
// Tk or of Tk+1, that the transitions Tk->Ik plus Ik->Tk+1 equal those of
// Tk->Tk+1, that no step has more transitions than the worst step of the
// plain LFSR sequence, that the average transitions per applied vector are
// halved, that the test vectors repeat with period 255, and that seed
// loading works.
module tb_lp_lfsr;
  logic       clk = 1'b0;
  logic       rst, load, en;
  logic [7:0] seed, out;
  logic       is_inter;
  int checks = 0, failures = 0;

  lp_lfsr dut (.clk, .rst, .load, .seed, .en, .out, .is_inter);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [7:0] nxt(logic [7:0] s);
    return {s[6:0], s[7] ^ s[5] ^ s[4] ^ s[3]};
  endfunction

  function automatic logic [7:0] mid(logic [7:0] a, logic [7:0] b);
    logic [7:0] m;
    for (int i = 0; i < 8; i++) m[i] = (i % 2 == 1) ? (a[i] | b[i]) : (a[i] & b[i]);
    return m;
  endfunction

  task automatic run_from(logic [7:0] s0, int steps);
    logic [7:0] tk, prev;
    int peak_lp = 0, peak_plain = 0, sum_lp = 0, sum_plain = 0;
    tk = s0; prev = out;
    for (int i = 0; i < steps; i++) begin
      logic [7:0] tn, im;
      tn = nxt(tk);
      im = mid(tk, tn);
      checks++;
      if (out !== tk || is_inter !== 1'b0) begin failures++; $display("T %0d: %h vs %h", i, out, tk); end
      @(negedge clk);
      checks++;
      if (out !== im || is_inter !== 1'b1) begin failures++; $display("I %0d: %h vs %h", i, out, im); end
      checks++;
      if (((out ^ tk) & (out ^ tn)) != 0) begin failures++; $display("I bit from neither"); end
      checks++;
      if ($countones(tk ^ out) + $countones(out ^ tn) != $countones(tk ^ tn)) begin
        failures++; $display("transition sum");
      end
      peak_lp    = ($countones(tk ^ out) > peak_lp) ? $countones(tk ^ out) : peak_lp;
      peak_lp    = ($countones(out ^ tn) > peak_lp) ? $countones(out ^ tn) : peak_lp;
      peak_plain = ($countones(tk ^ tn) > peak_plain) ? $countones(tk ^ tn) : peak_plain;
      sum_lp    += $countones(tk ^ out) + $countones(out ^ tn);
      sum_plain += 2 * $countones(tk ^ tn);
      @(negedge clk);
      tk = tn;
    end
    checks++;
    if (peak_lp > peak_plain) begin failures++; $display("peak %0d vs %0d", peak_lp, peak_plain); end
    checks++;
    // per-step average transitions are halved
    if (sum_lp * 2 != sum_plain) begin failures++; $display("average %0d vs %0d", sum_lp, sum_plain); end
  endtask

  initial begin
    logic [7:0] s;
    int period;
    rst = 1; load = 0; en = 0; seed = 0;
    @(negedge clk); @(negedge clk);
    rst = 0; en = 1;
    run_from(8'h01, 300);
    // seed load
    load = 1; seed = 8'h5A;
    @(negedge clk);
    load = 0;
    run_from(8'h5A, 100);
    // hold with en low
    en = 0; s = out;
    repeat (5) @(negedge clk);
    checks++;
    if (out !== s) begin failures++; $display("en low changed output"); end
    // period of the test vector sequence
    load = 1; seed = 8'h01; en = 1;
    @(negedge clk);
    load = 0; period = 0;
    do begin
      @(negedge clk); @(negedge clk);
      period++;
    end while (out != 8'h01 && period < 1000);
    checks++;
    if (period != 255) begin failures++; $display("period %0d", period); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
