// code_registers: programming registers of the PRESTO generator.
//
// Holds the operating mode, the 4-bit switching code (fraction of hold
// latches put in toggle mode), the 4-bit Toggle code and the 4-bit Hold code
// (lengths of toggle and hold periods). A rising clock edge with we high
// copies cfg_in into the registers; the new values appear at cfg one cycle
// later. Synchronous active-high reset selects LBIST mode with all codes 0,
// which makes the generator behave as a plain PRPG (every latch transparent).
//
// The three 4-bit registers follow the design description; the write port,
// the mode bit kept with them and the reset values are this implementation's
// choices.
module code_registers
  import presto_pkg::*;
(
  input  logic        clk,
  input  logic        rst,
  input  logic        we,
  input  presto_cfg_t cfg_in,
  output presto_cfg_t cfg
);

  always_ff @(posedge clk) begin
    if (rst) begin
      cfg.mode        <= MODE_LBIST;
      cfg.sw_code     <= '0;
      cfg.toggle_code <= '0;
      cfg.hold_code   <= '0;
    end else if (we) begin
      cfg <= cfg_in;
    end
  end

endmodule
