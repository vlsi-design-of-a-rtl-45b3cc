// tb_hold_latches: self-checking testbench for hold_latches.
//
// Drives random PRPG data, per-latch enables and run enables for 3000 cycles
// and checks after each edge that enabled latches took their input and all
// others kept their value. Also checks the reset value and that with every
// enable low the latches stay frozen for 100 cycles of changing input.
module tb_hold_latches;
  logic        clk = 1'b0;
  logic        rst, run;
  logic [31:0] en, in, h, model;
  int checks = 0, failures = 0;

  hold_latches dut (.clk, .rst, .run, .en, .in, .h);

  always #5 clk = ~clk;

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rst = 1; run = 0; en = '0; in = '0;
    @(negedge clk); @(negedge clk);
    rst = 0; model = '0;
    checks++;
    if (h !== '0) begin failures++; $display("reset %h", h); end
    for (int i = 0; i < 3000; i++) begin
      run = $urandom_range(0, 3) != 0;
      en  = $urandom & $urandom;
      in  = $urandom;
      @(negedge clk);
      if (run) for (int b = 0; b < 32; b++) if (en[b]) model[b] = in[b];
      checks++;
      if (h !== model) begin failures++; $display("cycle %0d: %h vs %h", i, h, model); end
    end
    run = 1; en = '0;
    for (int i = 0; i < 100; i++) begin
      in = $urandom;
      @(negedge clk);
      checks++;
      if (h !== model) begin failures++; $display("frozen %0d", i); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
