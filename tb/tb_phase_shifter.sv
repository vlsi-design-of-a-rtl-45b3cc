// tb_phase_shifter: self-checking testbench for phase_shifter.
//
// Applies 2000 random 32-bit latch words and checks one cycle later that
// every output is the XOR of latches j, j+11 and j+23 (mod 32). It also
// checks that no two outputs use the same three latches and that each output
// stays constant while its three latches are constant and all the others
// change.
module tb_phase_shifter;
  logic        clk = 1'b0;
  logic        rst;
  logic [31:0] in, out, prev_in, expect_out;
  int checks = 0, failures = 0;

  phase_shifter dut (.clk, .rst, .in, .out);

  always #5 clk = ~clk;

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [31:0] ref_ps(logic [31:0] x);
    logic [31:0] y;
    for (int j = 0; j < 32; j++) y[j] = x[j] ^ x[(j + 11) % 32] ^ x[(j + 23) % 32];
    return y;
  endfunction

  initial begin
    rst = 1; in = '0;
    @(negedge clk); @(negedge clk);
    rst = 0;
    checks++;
    if (out !== '0) begin failures++; $display("reset"); end
    for (int i = 0; i < 2000; i++) begin
      in = $urandom;
      @(negedge clk);
      checks++;
      if (out !== ref_ps(in)) begin failures++; $display("word %0d: %h vs %h", i, out, ref_ps(in)); end
    end
    // An output with its three latches held does not change.
    for (int j = 0; j < 32; j++) begin
      logic [31:0] keep, w0, w1;
      keep = (32'h1 << j) | (32'h1 << ((j + 11) % 32)) | (32'h1 << ((j + 23) % 32));
      w0 = $urandom;
      w1 = (w0 & keep) | (~w0 & ~keep);
      in = w0; @(negedge clk); expect_out = out;
      in = w1; @(negedge clk);
      checks++;
      if (out[j] !== expect_out[j]) begin failures++; $display("held output %0d changed", j); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
