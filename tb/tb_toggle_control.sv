// tb_toggle_control: self-checking testbench for toggle_control.
//
// Checks the reset values (shift register clear, toggle control register all
// ones), then drives random serial data, run enables and reload pulses for
// 2000 cycles and compares both registers with a reference model. Finally it
// shifts in a known 32-bit word, reloads, and checks the word arrives intact.
module tb_toggle_control;
  logic        clk = 1'b0;
  logic        rst, run, sr_in, reload;
  logic [31:0] sr, tcr, m_sr, m_tcr;
  int checks = 0, failures = 0;

  toggle_control dut (.clk, .rst, .run, .sr_in, .reload, .sr, .tcr);

  always #5 clk = ~clk;

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [31:0] word;
    rst = 1; run = 0; sr_in = 0; reload = 0;
    @(negedge clk); @(negedge clk);
    rst = 0;
    m_sr = '0; m_tcr = '1;
    checks++;
    if (sr !== m_sr || tcr !== m_tcr) begin failures++; $display("reset"); end
    for (int i = 0; i < 2000; i++) begin
      run    = $urandom_range(0, 3) != 0;
      sr_in  = $urandom_range(0, 1);
      reload = $urandom_range(0, 15) == 0;
      @(negedge clk);
      if (run) begin
        if (reload) m_tcr = m_sr;
        m_sr = {m_sr[30:0], sr_in};
      end
      checks++;
      if (sr !== m_sr || tcr !== m_tcr) begin
        failures++; $display("cycle %0d: sr %h/%h tcr %h/%h", i, sr, m_sr, tcr, m_tcr);
      end
    end
    word = 32'hC0FF_EE15;
    run = 1; reload = 0;
    for (int i = 31; i >= 0; i--) begin
      sr_in = word[i];
      @(negedge clk);
    end
    reload = 1;
    @(negedge clk);
    reload = 0; run = 0;
    checks++;
    if (tcr !== word) begin failures++; $display("word %h vs %h", tcr, word); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
