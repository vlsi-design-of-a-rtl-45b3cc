// presto_top: the two test pattern generators side by side.
//
// u_presto is the PRESTO generator (32-bit PRPG, hold latches, phase shifter
// to 32 scan chains, programmable toggling, LBIST and decompressor modes);
// u_lp is the 8-bit low-power LFSR that inserts intermediate vectors between
// successive test vectors. They share the clock and reset and are otherwise
// independent; every port of each is brought out. See presto.sv and
// lp_lfsr.sv for behaviour and timing.
//
// The PRESTO ports clk, rst, start, in and out are named as in the design
// description; the remaining ports and the pairing of the two generators in
// one top are this implementation's choices.
module presto_top
  import presto_pkg::*;
(
  input  logic                clk,
  input  logic                rst,
  // PRESTO generator
  input  logic                start,
  input  logic                in,
  input  logic                cfg_we,
  input  presto_cfg_t         cfg_in,
  input  logic                t_init,
  input  code_t               offset,
  output logic [N_CHAINS-1:0] out,
  output logic                scan_en,
  output logic                pattern_out_end,
  output logic                toggle_mode,
  // low-power LFSR
  input  logic                lp_load,
  input  logic [7:0]          lp_seed,
  input  logic                lp_en,
  output logic [7:0]          lp_out,
  output logic                lp_is_inter
);

  presto u_presto (
    .clk             (clk),
    .rst             (rst),
    .start           (start),
    .in              (in),
    .cfg_we          (cfg_we),
    .cfg_in          (cfg_in),
    .t_init          (t_init),
    .offset          (offset),
    .out             (out),
    .scan_en         (scan_en),
    .pattern_out_end (pattern_out_end),
    .toggle_mode     (toggle_mode)
  );

  lp_lfsr u_lp (
    .clk      (clk),
    .rst      (rst),
    .load     (lp_load),
    .seed     (lp_seed),
    .en       (lp_en),
    .out      (lp_out),
    .is_inter (lp_is_inter)
  );

endmodule
