// phase_leg_ctrl: gate-pulse generator for one phase leg of a modular
// 5-level converter.
//
// A phase leg holds two full-bridge cells (top and bottom), i.e. four
// half-bridge legs and eight IGBTs. Each half-bridge leg gets its own
// pwm_comparator, all four fed with the same phase reference but with
// carriers 90 degrees apart:
//   gate[0], gate[1] (S1, S2)  left  leg, top cell     0-degree carrier
//   gate[2], gate[3] (S3, S4)  right leg, top cell   180-degree carrier
//   gate[4], gate[5] (S5, S6)  left  leg, bottom cell  90-degree carrier
//   gate[6], gate[7] (S7, S8)  right leg, bottom cell 270-degree carrier
// S1, S3, S5, S7 (gate[0], [2], [4], [6]) drive the upper IGBT of a leg and
// S2, S4, S6, S8 the lower one. dba[i] is the deadband flag of comparator i (DBA1..DBA4).
// The right legs use right-leg comparators (upper IGBT on while the
// inverted carrier is above the reference), so each cell switches between
// 0 and +Vdc in the positive half-cycle and 0 and -Vdc in the negative one,
// and the two cells add to the five phase levels.
// This assignment of carriers to legs follows the description.
//
// Interface: clk, rst, ena, load, ref_val[8:0], car_0/90/180/270[8:0],
// gate[7:0], dba[3:0]. Timing: as pwm_comparator.
module phase_leg_ctrl
  import mmc_pkg::*;
#(
  parameter int unsigned DEADBAND = DEF_DEADBAND,
  parameter int unsigned DIV      = DEF_CAR_DIV
) (
  input  logic       clk,
  input  logic       rst,
  input  logic       ena,
  input  logic       load,
  input  cnt_t       ref_val,
  input  cnt_t       car_0,
  input  cnt_t       car_90,
  input  cnt_t       car_180,
  input  cnt_t       car_270,
  output logic [7:0] gate,
  output logic [3:0] dba
);
  cnt_t car [4];

  always_comb begin
    car[0] = car_0;     // top cell, left leg
    car[1] = car_180;   // top cell, right leg
    car[2] = car_90;    // bottom cell, left leg
    car[3] = car_270;   // bottom cell, right leg
  end

  for (genvar i = 0; i < 4; i++) begin : g_leg
    pwm_comparator #(.DEADBAND(DEADBAND), .DIV(DIV), .RIGHT_LEG(i % 2 == 1)) u_cmp (
      .clk    (clk),
      .rst    (rst),
      .ena    (ena),
      .load   (load),
      .ref_val(ref_val),
      .count  (car[i]),
      .pwm_t  (gate[2*i]),
      .pwm_b  (gate[2*i+1]),
      .dba    (dba[i])
    );
  end
endmodule
