// lp_lfsr: low-power test pattern generator built from an LFSR that inserts
// an intermediate vector between successive test vectors.
//
// An 8-bit external-XOR (Fibonacci) LFSR produces the test vectors T1, T2, ...
// For every bit, a logic block forms the AND and the OR of that bit of the
// present vector Tk and of the next vector Tk+1 (which an external-XOR LFSR
// already holds one stage lower), and a multiplexer picks one of the two.
// Whichever is picked equals the bit of Tk or of Tk+1, so the intermediate
// vector Ik lies between them: the bits that change from Tk to Tk+1 change
// partly on the step Tk -> Ik and the rest on Ik -> Tk+1, and the number of
// transitions per step applied to the circuit under test drops.
//
// Output sequence: T1, I1, T2, I2, ... one vector per clock edge with en high
// (the LFSR itself advances on every second such edge). A rising edge with
// load high loads seed (the initial seed vector) and restarts at a test
// vector; load wins over en. Synchronous active-high reset loads SEED.
// out and is_inter are decoded from registers in the same cycle.
//
// The 8-bit width, the external XOR, the AND/OR logic blocks feeding
// multiplexers and the insertion of intermediate vectors follow the design
// description. The polynomial x^8 + x^6 + x^5 + x^4 + 1, the multiplexer
// selection (SEL_OR: 1 selects OR, 0 selects AND, fixed per bit) and the
// seed interface are this implementation's choices.
module lp_lfsr #(
  parameter int unsigned  W      = 8,
  parameter logic [W-1:0] TAPS   = W'(8'hB8),  // state bits 7,5,4,3
  parameter logic [W-1:0] SEL_OR = W'(8'hAA),
  parameter logic [W-1:0] SEED   = W'(1)
) (
  input  logic         clk,
  input  logic         rst,
  input  logic         load,
  input  logic [W-1:0] seed,
  input  logic         en,
  output logic [W-1:0] out,
  output logic         is_inter  // out is an intermediate vector
);

  logic [W-1:0] q, qn, and_b, or_b, inter;
  logic         phase;

  always_comb begin
    qn    = {q[W-2:0], ^(q & TAPS)};
    and_b = q & qn;
    or_b  = q | qn;
    for (int unsigned i = 0; i < W; i++)
      inter[i] = SEL_OR[i] ? or_b[i] : and_b[i];
    out      = phase ? inter : q;
    is_inter = phase;
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      q     <= SEED;
      phase <= 1'b0;
    end else if (load) begin
      q     <= seed;
      phase <= 1'b0;
    end else if (en) begin
      if (phase) q <= qn;
      phase <= ~phase;
    end
  end

endmodule
