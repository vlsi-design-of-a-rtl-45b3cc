// weighted_logic: programmable weighted pseudorandom bit source.
//
// Four AND gates produce 1s with probabilities 1/2, 1/4, 1/8 and 1/16 by
// AND-ing one, two, three and four PRPG bits. Each gate is enabled by one bit
// of a 4-bit code and the enabled gates are ORed, so a code selects one of
// fifteen probabilities (code 0 gives a constant 0). With independent PRPG
// bits the probability of a 1 is 1 - prod(1 - p_k) over the enabled gates.
// Purely combinational.
//
// Interface: rnd[0] feeds the 1/2 gate, rnd[2:1] the 1/4 gate, rnd[5:3] the
// 1/8 gate and rnd[9:6] the 1/16 gate. code[3] enables the 1/2 gate, code[2]
// the 1/4 gate, code[1] the 1/8 gate and code[0] the 1/16 gate.
//
// The four gates, their probabilities and the OR follow the design
// description; the assignment of code bits to gates is this implementation's
// choice (it makes larger codes give roughly larger probabilities).
module weighted_logic
  import presto_pkg::*;
(
  input  code_t              code,
  input  logic [WL_BITS-1:0] rnd,
  output logic               out
);

  logic [3:0] gate;

  always_comb begin
    gate[0] = code[3] & rnd[0];
    gate[1] = code[2] & (&rnd[2:1]);
    gate[2] = code[1] & (&rnd[5:3]);
    gate[3] = code[0] & (&rnd[9:6]);
    out     = |gate;
  end

endmodule
