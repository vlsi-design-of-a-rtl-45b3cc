// phase_shifter: XOR network between the hold latches and the scan chains.
//
// Every output (one per scan chain) is the XOR of three different hold latch
// outputs: out[j] = in[j] ^ in[j+OFS1] ^ in[j+OFS2], indices taken modulo
// N_IN. Because of this, a scan chain receives a constant value whenever its
// three latches are all in hold mode. The XOR result is registered on every
// rising clock edge, so out follows in with one cycle of latency. Synchronous
// active-high reset clears the outputs.
//
// Three latches per output and the port names clk, rst, in and out follow the
// design description. The tap offsets 0, 11 and 23 (which give every output a
// distinct triple of latches) and the output register are this
// implementation's choices.
module phase_shifter #(
  parameter int unsigned N_IN  = 32,
  parameter int unsigned N_OUT = 32,
  parameter int unsigned OFS1  = 11,
  parameter int unsigned OFS2  = 23
) (
  input  logic             clk,
  input  logic             rst,
  input  logic [N_IN-1:0]  in,
  output logic [N_OUT-1:0] out
);

  logic [N_OUT-1:0] xo;

  always_comb begin
    for (int unsigned j = 0; j < N_OUT; j++)
      xo[j] = in[j % N_IN] ^ in[(j + OFS1) % N_IN] ^ in[(j + OFS2) % N_IN];
  end

  always_ff @(posedge clk) begin
    if (rst) out <= '0;
    else     out <= xo;
  end

  initial begin
    assert (OFS1 % N_IN != 0 && OFS2 % N_IN != 0 && OFS1 % N_IN != OFS2 % N_IN)
      else $error("phase_shifter: the three taps of an output must be different latches");
  end

endmodule
