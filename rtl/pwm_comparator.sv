// pwm_comparator: carrier/reference comparator with deadband for one
// half-bridge leg (the top and the bottom IGBT of the leg).
//
// The reference is compared with the triangular carrier. To keep the two
// IGBTs of the leg from conducting together, each threshold is moved by half
// the deadband:
//   below = 1  when  count <  ref - DEADBAND/2   (reference above carrier)
//   above = 1  when  count >= ref + DEADBAND/2   (carrier above reference)
// In between (|count - ref| within DEADBAND/2) both are off and dba, the
// deadband flag, is high.
// Left leg of a full-bridge cell (RIGHT_LEG = 0, "Left_Comp"): the upper
// IGBT follows "below", pwm_t = below, pwm_b = above.
// Right leg (RIGHT_LEG = 1, "Rig_Comp"), fed with the inverted carrier: the
// upper IGBT follows "above", pwm_t = above, pwm_b = below. Comparing one
// reference with a carrier and with its mirror image this way gives unipolar
// switching: each cell outputs 0 or +Vdc in the positive half-cycle and 0 or
// -Vdc in the negative one. The thresholds are computed with one extra bit on
// each side, so a reference near 0 or 511 simply leaves one gate off for the
// whole carrier period instead of wrapping round.
//
// load: while high, the comparison value follows ref; while low it is held
// (the last loaded value keeps being used). ena: while low both gates and
// dba are forced off. The comparator updates on the ticks of its own clock
// divider (DIV cycles), which in the controller runs at the carrier rate, so
// the gates follow the carrier one carrier step later.
// The thresholds and the 32-count deadband follow the description; the
// swapped gate sense of the right-leg comparator is inferred from the
// nine-level line voltage the converter produces; the meaning of load and
// ena and the registered outputs are this design's choices.
//
// Interface: clk, synchronous active-high rst, ena, load, ref_val[8:0],
// count[8:0] (carrier), pwm_t (upper IGBT), pwm_b (lower IGBT), dba.
// Timing: outputs are registered and change one cycle after a divider tick
// (and one cycle after ena falls).
module pwm_comparator
  import mmc_pkg::*;
#(
  parameter int unsigned W        = CNT_W,
  parameter int unsigned DEADBAND = DEF_DEADBAND,
  parameter int unsigned DIV      = DEF_CAR_DIV,
  parameter bit          RIGHT_LEG = 1'b0
) (
  input  logic         clk,
  input  logic         rst,
  input  logic         ena,
  input  logic         load,
  input  logic [W-1:0] ref_val,
  input  logic [W-1:0] count,
  output logic         pwm_t,
  output logic         pwm_b,
  output logic         dba
);
  localparam int unsigned HALF = DEADBAND / 2;

  logic         tick;
  logic [W-1:0] cmp_q;     // held comparison value
  logic [W-1:0] cmp;       // value used in this comparison
  logic signed [W+1:0] top_cmp, bot_cmp, cnt_s;
  logic         below, above, t_next, b_next;

  clk_divider #(.DIV(DIV)) u_div (
    .clk (clk),
    .rst (rst),
    .en  (ena),
    .tick(tick)
  );

  always_comb begin
    cmp     = load ? ref_val : cmp_q;
    cnt_s   = (W+2)'(count);
    top_cmp = (W+2)'(cmp) + (W+2)'(HALF);
    bot_cmp = (W+2)'(cmp) - (W+2)'(HALF);
    below   = cnt_s <  bot_cmp;
    above   = cnt_s >= top_cmp;
    t_next  = RIGHT_LEG ? above : below;
    b_next  = RIGHT_LEG ? below : above;
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      cmp_q <= '0;
      pwm_t <= 1'b0;
      pwm_b <= 1'b0;
      dba   <= 1'b0;
    end else if (!ena) begin
      pwm_t <= 1'b0;
      pwm_b <= 1'b0;
      dba   <= 1'b0;
    end else if (tick) begin
      cmp_q <= cmp;
      pwm_t <= t_next;
      pwm_b <= b_next;
      dba   <= !t_next && !b_next;
    end
  end

  // The two IGBTs of a leg must never be driven on together.
  a_no_shoot_through: assert property (@(posedge clk) disable iff (rst) !(pwm_t && pwm_b));
endmodule
