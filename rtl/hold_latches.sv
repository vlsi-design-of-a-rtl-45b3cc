// hold_latches: the N hold latches H1..HN between the PRPG and the phase
// shifter.
//
// Latch i is in toggle mode while en[i] is 1: it passes PRPG bit in[i] on to
// the phase shifter. While en[i] is 0 it is in hold mode and keeps the last
// bit it took, so the phase shifter inputs it drives stay constant. The
// latches are built as clock-enabled flip-flops: on each rising edge with run
// high, h[i] takes in[i] if en[i] is 1 and keeps its value otherwise. The new
// value is seen at h one cycle after the edge. Synchronous active-high reset
// clears all latches.
//
// The per-latch enable, the toggle and hold behaviour and the port names clk,
// rst, in and h follow the design description; using edge-triggered storage
// instead of level-sensitive latches (which keeps the design fully
// synchronous) and the reset value are this implementation's choices.
module hold_latches #(
  parameter int unsigned N = 32
) (
  input  logic         clk,
  input  logic         rst,
  input  logic         run,
  input  logic [N-1:0] en,
  input  logic [N-1:0] in,
  output logic [N-1:0] h
);

  always_ff @(posedge clk) begin
    if (rst)      h <= '0;
    else if (run) h <= (in & en) | (h & ~en);
  end

  // With run low nothing moves.
  a_frozen: assert property (@(posedge clk) disable iff (rst) !run |=> (h == $past(h)));

endmodule
