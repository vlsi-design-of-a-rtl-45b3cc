// toggle_control: shift register and toggle control register.
//
// The N-bit shift register takes one bit per clock (sr_in enters at bit 0 and
// the contents move towards the MSB) on every edge with run high. Once per
// test pattern, on an edge with run and reload high, the toggle control
// register (tcr) is loaded with the current shift register contents. A 1 in
// tcr[i] marks hold latch i as being in toggle mode for the whole pattern, so
// the fraction of 1s sets the scan shift activity. In LBIST mode sr_in comes
// from the weighted logic; in decompressor mode it comes straight from the
// PRPG, so the control register content is encoded in the test data.
//
// Timing: tcr changes one cycle after the reload edge. Synchronous active-high
// reset clears the shift register and sets tcr to all ones, so the first
// pattern after reset toggles every latch.
//
// The shift register, the once-per-pattern reload and the deterministic fill
// in decompressor mode follow the design description; the shift direction and
// the reset values are this implementation's choices.
module toggle_control #(
  parameter int unsigned N = 32
) (
  input  logic         clk,
  input  logic         rst,
  input  logic         run,
  input  logic         sr_in,
  input  logic         reload,
  output logic [N-1:0] sr,
  output logic [N-1:0] tcr
);

  always_ff @(posedge clk) begin
    if (rst) begin
      sr  <= '0;
      tcr <= '1;
    end else if (run) begin
      sr <= {sr[N-2:0], sr_in};
      if (reload) tcr <= sr;
    end
  end

endmodule
