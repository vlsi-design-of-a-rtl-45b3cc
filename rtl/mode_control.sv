// mode_control: hold/toggle period control of the PRESTO generator.
//
// A T flip-flop (t) splits the shifting of each test pattern into alternating
// toggle periods (t = 1: latches enabled by the toggle control register follow
// the PRPG) and hold periods (t = 0: every hold latch is frozen). The flip-flop
// changes state on every clock edge where its input tin is 1.
//
// LBIST mode: four 2-input multiplexers pass the Toggle code while t = 1 and
// the Hold code while t = 0 to a weighted logic block, whose pseudorandom
// output is tin. The Toggle code thus sets how soon a toggle period ends and
// the Hold code how soon a hold period ends.
//
// Decompressor mode: the weighted logic is not used. A 4-bit down counter
// times the periods. On the first_cycle edge t is loaded with t_init and the
// counter with offset. On each later shift cycle the counter counts down;
// when it is 0, tin is 1, t toggles and the counter is reloaded with the code
// of the period that starts (Hold code when entering hold, Toggle code when
// entering toggle). A period whose code is c therefore lasts c+1 shift
// cycles, and the first period offset+1 cycles. If the Hold code is 0000 the
// No Hold signal forces t_eff to 1, so the whole pattern is in toggle mode.
//
// Timing: t and the counter update on rising edges with run high; t_eff is
// combinational from t. Synchronous active-high reset sets t = 1, count 0.
//
// The T flip-flop, the multiplexers, the weighted termination, the down
// counter with its offset and initial T value, and the No Hold override follow
// the design description. Which code is loaded on a toggle, the c+1 period
// length and the reset values are this implementation's reading.
module mode_control
  import presto_pkg::*;
(
  input  logic               clk,
  input  logic               rst,
  input  logic               run,
  input  logic               decomp,       // decompressor mode
  input  logic               in_shift,     // current cycle is a shift cycle
  input  logic               first_cycle,  // initialize T and counter (decompressor)
  input  code_t              toggle_code,
  input  code_t              hold_code,
  input  logic [WL_BITS-1:0] rnd,          // PRPG bits for the weighted logic
  input  logic               t_init,       // initial T value per pattern (decompressor)
  input  code_t              offset,       // initial counter value per pattern (decompressor)
  output logic               t,            // T flip-flop: 1 toggle period, 0 hold period
  output logic               t_eff,        // t after the No Hold override
  output logic               no_hold,
  output logic               tin           // T flip-flop input
);

  code_t sel_code;
  code_t cnt;
  logic  wl_out;

  // The four 2-input multiplexers in front of the weighted logic.
  always_comb sel_code = t ? toggle_code : hold_code;

  weighted_logic u_wl (
    .code (sel_code),
    .rnd  (rnd),
    .out  (wl_out)
  );

  always_comb begin
    if (decomp) tin = in_shift && !first_cycle && (cnt == '0);
    else        tin = wl_out;
    no_hold = decomp && (hold_code == '0);
    t_eff   = t | no_hold;
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      t   <= 1'b1;
      cnt <= '0;
    end else if (run) begin
      if (decomp) begin
        if (first_cycle) begin
          t   <= t_init;
          cnt <= offset;
        end else if (in_shift) begin
          if (tin) begin
            t   <= ~t;
            cnt <= t ? hold_code : toggle_code;
          end else begin
            cnt <= cnt - 1'b1;
          end
        end
      end else begin
        t <= t ^ tin;
      end
    end
  end

  // No Hold never lets a hold period through.
  a_no_hold: assert property (@(posedge clk) disable iff (rst) no_hold |-> t_eff);
  // The first-cycle edge starts the pattern in the requested period.
  a_t_init: assert property (@(posedge clk) disable iff (rst)
                             (run && decomp && first_cycle) |=> (t == $past(t_init)));

endmodule
