// presto: low-power programmable pseudorandom pattern generator with
// preselected toggling (PRESTO), usable both as a logic BIST source and as a
// test data decompressor.
//
// Data path: a 32-bit PRPG feeds 32 hold latches, which feed a phase shifter
// driving 32 scan chains (out). A latch in toggle mode passes its PRPG bit; a
// latch in hold mode keeps its value, and a scan chain whose three phase
// shifter latches are all held receives a constant, so it does not toggle.
//
// Latch enables: en[i] = lp_off | first_cycle | (tcr[i] & t_eff).
//  - tcr, the toggle control register, is reloaded once per pattern from a
//    shift register. In LBIST mode the shift register is filled by a weighted
//    logic block whose 1-probability is set by the 4-bit switching code, so
//    the code sets the fraction of latches that may toggle. Switching code 0
//    sets lp_off, which makes every latch transparent (plain PRPG); it does
//    so in both modes.
//  - t_eff comes from the T flip-flop of mode_control, which alternates hold
//    periods (all latches frozen) and toggle periods. In LBIST mode their
//    lengths are random, set by the Toggle and Hold codes; in decompressor
//    mode a down counter makes them exact (Toggle/Hold code + 1 cycles).
//  - first_cycle, in decompressor mode, reloads every latch at the end of the
//    PRPG initialization phase.
//
// Decompressor mode: the tester channel in is XORed into the PRPG feedback,
// the shift register is filled straight from the PRPG, and each pattern is an
// initialization phase (INIT_LEN cycles) followed by SHIFT_LEN shift cycles.
// t_init and offset are sampled on the first_cycle edge and set the initial
// period type and its length (offset + 1 cycles). Hold code 0000 disables the
// hold periods (No Hold).
//
// Programming: a rising edge with cfg_we high writes cfg_in (mode, switching,
// Toggle and Hold codes) and restarts the pattern count. start is a run
// enable: with start low, all state is frozen.
//
// Timing: the latches take the PRPG state at the end of a cycle; the phase
// shifter registers their XOR one cycle later. out carries a scan shift word
// whenever scan_en is 1, and pattern_out_end marks the last word of a pattern.
// Synchronous, active-high reset.
//
// The block structure (PRPG, hold latches, phase shifter, toggle control and
// shift registers, weighted logic, switching/Toggle/Hold registers, T
// flip-flop, down counter, No Hold, first cycle, ATE injection) follows the
// design description, as do the 32-bit width and the top port names clk, rst,
// start, in and out. Bit assignments, tap choices, lengths, reset values and
// the programming interface are this implementation's own.
module presto
  import presto_pkg::*;
#(
  parameter int unsigned SHIFT_LEN = 32,  // shift cycles per pattern
  parameter int unsigned INIT_LEN  = 32,  // initialization cycles per pattern (decompressor)
  parameter logic [N_PRPG-1:0] SEED = N_PRPG'(1)
) (
  input  logic                clk,
  input  logic                rst,
  input  logic                start,
  input  logic                in,              // ATE channel (decompressor mode)
  input  logic                cfg_we,
  input  presto_cfg_t         cfg_in,
  input  logic                t_init,          // per-pattern initial T value (decompressor)
  input  code_t               offset,          // per-pattern counter offset (decompressor)
  output logic [N_CHAINS-1:0] out,             // scan chain inputs
  output logic                scan_en,         // out holds a shift word
  output logic                pattern_out_end, // out holds the last word of a pattern
  output logic                toggle_mode      // generator is in a toggle period
);

  presto_cfg_t       cfg;
  logic              decomp;
  logic              in_shift, reload, first_cycle, pattern_end;
  logic [N_PRPG-1:0] state;
  logic [WL_BITS-1:0] rnd_v, rnd_h;
  logic              v_out, sr_in, lp_off;
  logic [N_PRPG-1:0] sr, tcr, en, h;
  logic              t, t_eff, no_hold, tin;

  code_registers u_cfg (
    .clk    (clk),
    .rst    (rst),
    .we     (cfg_we),
    .cfg_in (cfg_in),
    .cfg    (cfg)
  );

  always_comb decomp = (cfg.mode == MODE_DECOMP);

  pattern_counter #(
    .SHIFT_LEN (SHIFT_LEN),
    .INIT_LEN  (INIT_LEN)
  ) u_pc (
    .clk         (clk),
    .rst         (rst),
    .run         (start),
    .restart     (cfg_we),
    .decomp      (decomp),
    .in_shift    (in_shift),
    .reload      (reload),
    .first_cycle (first_cycle),
    .pattern_end (pattern_end)
  );

  prpg #(
    .N    (N_PRPG),
    .SEED (SEED)
  ) m1 (
    .clk    (clk),
    .rst    (rst),
    .start  (start),
    .inject (decomp),
    .ate_in (in),
    .out    (state)
  );

  always_comb begin
    for (int unsigned k = 0; k < WL_BITS; k++) begin
      rnd_v[k] = state[V_TAPS[k]];
      rnd_h[k] = state[H_TAPS[k]];
    end
  end

  // Weighted logic V: sets the density of 1s in the toggle control register.
  weighted_logic u_wl_v (
    .code (cfg.sw_code),
    .rnd  (rnd_v),
    .out  (v_out)
  );

  always_comb sr_in = decomp ? state[DEC_SR_TAP] : v_out;

  toggle_control #(
    .N (N_PRPG)
  ) u_tc (
    .clk    (clk),
    .rst    (rst),
    .run    (start),
    .sr_in  (sr_in),
    .reload (reload),
    .sr     (sr),
    .tcr    (tcr)
  );

  mode_control u_mc (
    .clk         (clk),
    .rst         (rst),
    .run         (start),
    .decomp      (decomp),
    .in_shift    (in_shift),
    .first_cycle (first_cycle),
    .toggle_code (cfg.toggle_code),
    .hold_code   (cfg.hold_code),
    .rnd         (rnd_h),
    .t_init      (t_init),
    .offset      (offset),
    .t           (t),
    .t_eff       (t_eff),
    .no_hold     (no_hold),
    .tin         (tin)
  );

  always_comb begin
    lp_off = (cfg.sw_code == '0);
    en     = {N_PRPG{lp_off | first_cycle}} | (tcr & {N_PRPG{t_eff}});
  end

  hold_latches #(
    .N (N_PRPG)
  ) H (
    .clk (clk),
    .rst (rst),
    .run (start),
    .en  (en),
    .in  (state),
    .h   (h)
  );

  phase_shifter #(
    .N_IN  (N_PRPG),
    .N_OUT (N_CHAINS),
    .OFS1  (PS_OFS1),
    .OFS2  (PS_OFS2)
  ) m9 (
    .clk (clk),
    .rst (rst),
    .in  (h),
    .out (out)
  );

  // The latch contents of a shift cycle reach out one cycle later.
  always_ff @(posedge clk) begin
    if (rst) begin
      scan_en         <= 1'b0;
      pattern_out_end <= 1'b0;
    end else begin
      scan_en         <= start && in_shift;
      pattern_out_end <= start && pattern_end;
    end
  end

  always_comb toggle_mode = t_eff;

endmodule
