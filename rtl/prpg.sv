// prpg: pseudorandom pattern generator of the PRESTO generator.
//
// An N-bit external-XOR (Fibonacci) linear feedback shift register. On every
// rising clock edge with start high the register shifts one place towards the
// MSB and the feedback bit enters at bit 0. The feedback is the XOR of the
// taps of the primitive polynomial x^32 + x^22 + x^2 + x + 1, so the sequence
// has period 2^32-1. When inject is high the tester (ATE) channel bit ate_in is
// XORed into the feedback, which lets an external tester steer the PRPG state
// continuously, as in dynamic LFSR reseeding. Synchronous active-high reset
// loads SEED. The state is visible at out one cycle after each edge.
//
// The PRPG as a linear feedback register, its 32-bit width and the port names
// clk, rst, start and out follow the design description. The polynomial, the
// seed, a single ATE channel and injection into the feedback are this
// implementation's choices.
module prpg #(
  parameter int unsigned N        = 32,
  parameter logic [N-1:0] SEED    = N'(1),
  // Feedback taps (bit i set: state bit i enters the XOR); default x^32+x^22+x^2+x+1.
  parameter logic [N-1:0] TAPS    = N'(32'h8020_0003)
) (
  input  logic         clk,
  input  logic         rst,
  input  logic         start,   // run enable
  input  logic         inject,  // XOR ate_in into the feedback
  input  logic         ate_in,  // tester channel bit
  output logic [N-1:0] out
);

  logic fb;

  always_comb fb = (^(out & TAPS)) ^ (inject & ate_in);

  always_ff @(posedge clk) begin
    if (rst)        out <= SEED;
    else if (start) out <= {out[N-2:0], fb};
  end

endmodule
