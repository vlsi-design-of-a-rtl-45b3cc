// pattern_counter: test pattern sequencing ("Pattern count").
//
// Counts the clock cycles of one test pattern and tells the rest of the
// generator where it is. In LBIST mode a pattern is SHIFT_LEN shift cycles;
// the last of them raises pattern_end and reload, so the toggle control
// register takes new contents for the next pattern. In decompressor mode a
// pattern starts with INIT_LEN initialization cycles, during which the tester
// fills the PRPG and the shift register and nothing is shifted into the scan
// chains, followed by SHIFT_LEN shift cycles. The last initialization cycle
// raises first_cycle and reload: the hold latches, the toggle control
// register, the T flip-flop and the down counter are all initialized on that
// edge.
//
// Timing: outputs are decoded from the cycle count of the current cycle. The
// count advances on edges with run high; restart (or synchronous active-high
// reset) returns it to the first cycle of a pattern.
//
// The once-per-pattern reload, the initialization phase and the first-cycle
// signal follow the design description; the pattern and initialization
// lengths are this implementation's defaults (one PRPG length each, so a
// single tester channel can refill the 32-bit PRPG and shift register).
module pattern_counter #(
  parameter int unsigned SHIFT_LEN = 32,
  parameter int unsigned INIT_LEN  = 32
) (
  input  logic clk,
  input  logic rst,
  input  logic run,
  input  logic restart,
  input  logic decomp,       // 1: decompressor mode (with initialization phase)
  output logic in_shift,     // current cycle shifts the scan chains
  output logic reload,       // load the toggle control register on this edge
  output logic first_cycle,  // last initialization cycle (decompressor mode)
  output logic pattern_end   // last cycle of the pattern
);

  localparam int unsigned TOTAL = INIT_LEN + SHIFT_LEN;
  localparam int unsigned CW    = $clog2(TOTAL + 1);

  logic [CW-1:0] cnt;

  always_comb begin
    if (decomp) begin
      in_shift    = (cnt >= CW'(INIT_LEN));
      first_cycle = (cnt == CW'(INIT_LEN - 1));
      pattern_end = (cnt == CW'(TOTAL - 1));
      reload      = first_cycle;
    end else begin
      in_shift    = 1'b1;
      first_cycle = 1'b0;
      pattern_end = (cnt >= CW'(SHIFT_LEN - 1));
      reload      = pattern_end;
    end
  end

  always_ff @(posedge clk) begin
    if (rst || restart)   cnt <= '0;
    else if (run) begin
      if (pattern_end)    cnt <= '0;
      else                cnt <= cnt + 1'b1;
    end
  end

  // first_cycle exists only in decompressor mode and always comes with reload.
  a_first_cycle: assert property (@(posedge clk) disable iff (rst) first_cycle |-> (decomp && reload));
  // A shift cycle follows the first cycle.
  a_after_first: assert property (@(posedge clk) disable iff (rst || restart)
                                  (run && first_cycle) |=> in_shift);

  initial begin
    assert (SHIFT_LEN >= 1 && INIT_LEN >= 1)
      else $error("pattern_counter: SHIFT_LEN and INIT_LEN must be at least 1");
  end

endmodule
