// tb_weighted_logic: self-checking testbench for weighted_logic.
//
// Applies all 16 codes with all 1024 combinations of the ten random bits.
// Each output is compared with the gate equations, and for each code the
// number of 1s over all combinations is compared with the exact count
// 1024 * (1 - prod(1 - p)) over the enabled gates, p = 1/2, 1/4, 1/8, 1/16.
module tb_weighted_logic;
  import presto_pkg::*;
  code_t      code;
  logic [9:0] rnd;
  logic       out;
  int checks = 0, failures = 0;

  weighted_logic dut (.code, .rnd, .out);

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int c = 0; c < 16; c++) begin
      int ones;
      real q;
      int expect_ones;
      ones = 0; q = 1.0;
      if (c[3]) q = q * 0.5;
      if (c[2]) q = q * 0.75;
      if (c[1]) q = q * 0.875;
      if (c[0]) q = q * 0.9375;
      expect_ones = int'(1024.0 * (1.0 - q));
      for (int r = 0; r < 1024; r++) begin
        logic e;
        code = code_t'(c);
        rnd  = 10'(r);
        #1;
        e = (c[3] && r[0]) || (c[2] && r[1] && r[2]) ||
            (c[1] && r[3] && r[4] && r[5]) || (c[0] && r[6] && r[7] && r[8] && r[9]);
        checks++;
        if (out !== e) begin failures++; $display("code %0d rnd %h: %b", c, r, out); end
        ones += int'(out);
      end
      checks++;
      if (ones != expect_ones) begin
        failures++; $display("code %0d: %0d ones, expected %0d", c, ones, expect_ones);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
