// tb_code_registers: self-checking testbench for code_registers.
//
// Checks the reset values (LBIST mode, all codes 0), then performs 500 cycles
// of random writes and idle cycles and compares the registers after each edge
// with the last written value.
module tb_code_registers;
  import presto_pkg::*;
  logic        clk = 1'b0;
  logic        rst, we;
  presto_cfg_t cfg_in, cfg, model;
  int checks = 0, failures = 0;

  code_registers dut (.clk, .rst, .we, .cfg_in, .cfg);

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rst = 1; we = 1; cfg_in = '1;
    @(negedge clk); @(negedge clk);
    rst = 0; we = 0;
    model = '0;
    checks++;
    if (cfg !== model || cfg.mode != MODE_LBIST) begin failures++; $display("reset %h", cfg); end
    for (int i = 0; i < 500; i++) begin
      we = $urandom_range(0, 2) == 0;
      cfg_in = presto_cfg_t'($urandom);
      @(negedge clk);
      if (we) model = cfg_in;
      checks++;
      if (cfg !== model) begin failures++; $display("cycle %0d: %h vs %h", i, cfg, model); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
