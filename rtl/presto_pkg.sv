// presto_pkg: types and constants shared by the PRESTO low-toggling pattern
// generator. The generator works on a 32-bit PRPG feeding 32 scan chains and
// is programmed with 4-bit codes (switching, Toggle and Hold registers). The
// operating mode selects weighted-random (LBIST) control or deterministic
// (decompressor) control of the hold/toggle periods.
//
// The 32-bit width and the 4-bit codes follow the design description; the
// feedback polynomial, the PRPG bits that drive each weighted logic block and
// the phase shifter tap spacing are this implementation's own choices.
package presto_pkg;

  localparam int unsigned N_PRPG   = 32;  // PRPG / hold latch count
  localparam int unsigned N_CHAINS = 32;  // phase shifter outputs (scan chains)
  localparam int unsigned CODE_W   = 4;   // width of switching / Toggle / Hold codes
  localparam int unsigned WL_BITS  = 10;  // PRPG bits used by one weighted logic block (1+2+3+4)

  typedef logic [CODE_W-1:0] code_t;

  // Operating mode of the generator.
  typedef enum logic {
    MODE_LBIST  = 1'b0,  // weighted pseudorandom control (logic BIST)
    MODE_DECOMP = 1'b1   // deterministic control (test data decompressor)
  } mode_e;

  // Contents of the programming registers.
  typedef struct packed {
    mode_e mode;
    code_t sw_code;      // switching code: fraction of latches in toggle mode
    code_t toggle_code;  // Toggle register: length of toggle periods
    code_t hold_code;    // Hold register: length of hold periods
  } presto_cfg_t;

  // PRPG bit positions driving the weighted logic blocks. Entry 0 feeds the
  // 0.5 gate, entries 1-2 the 0.25 gate, 3-5 the 0.125 gate, 6-9 the 0.0625 gate.
  localparam int unsigned V_TAPS [WL_BITS] = '{2, 5, 13, 9, 17, 26, 20, 24, 29, 31};
  localparam int unsigned H_TAPS [WL_BITS] = '{4, 8, 19, 11, 22, 30, 1, 14, 25, 28};

  // PRPG bit that fills the shift register directly in decompressor mode.
  localparam int unsigned DEC_SR_TAP = 31;

  // Phase shifter: chain j = h[j] ^ h[j+PS_OFS1] ^ h[j+PS_OFS2] (mod N_PRPG).
  localparam int unsigned PS_OFS1 = 11;
  localparam int unsigned PS_OFS2 = 23;

endpackage
