// tb_prpg: self-checking testbench for prpg.
//
// Runs the 32-bit PRPG for 3000 cycles with a randomly gated run enable and
// random tester-channel injection, and compares every state with a reference
// LFSR written here from the polynomial x^32 + x^22 + x^2 + x + 1 (state bits
// 31, 21, 1 and 0 feed back into bit 0). Also checks the reset seed and that
// no state repeats within the first 2000 free-running steps.
module tb_prpg;
  logic        clk = 1'b0;
  logic        rst, start, inject, ate_in;
  logic [31:0] out;
  int checks = 0, failures = 0;

  prpg dut (.clk, .rst, .start, .inject, .ate_in, .out);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [31:0] ref_next(logic [31:0] s, logic inj, logic a);
    logic fb;
    fb = s[31] ^ s[21] ^ s[1] ^ s[0] ^ (inj & a);
    return {s[30:0], fb};
  endfunction

  logic [31:0] model;
  logic [31:0] seen [$];

  initial begin
    rst = 1; start = 0; inject = 0; ate_in = 0;
    @(negedge clk); @(negedge clk);
    rst = 0;
    checks++; if (out !== 32'h1) begin failures++; $display("seed %h", out); end
    model = 32'h1;
    // free run: no repeats, matches model
    start = 1;
    for (int i = 0; i < 2000; i++) begin
      seen.push_back(out);
      @(negedge clk);
      model = ref_next(model, 0, 0);
      checks++;
      if (out !== model) begin failures++; $display("free run %0d: %h vs %h", i, out, model); end
    end
    foreach (seen[i]) if (seen[i] == out) begin failures++; $display("state repeated"); break; end
    checks++;
    // random enable and injection
    for (int i = 0; i < 1000; i++) begin
      start = $urandom_range(0, 3) != 0;
      inject = $urandom_range(0, 1);
      ate_in = $urandom_range(0, 1);
      @(negedge clk);
      if (start) model = ref_next(model, inject, ate_in);
      checks++;
      if (out !== model) begin failures++; $display("random %0d: %h vs %h", i, out, model); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
