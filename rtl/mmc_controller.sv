// mmc_controller: switching controller for a three-phase modular 5-level
// converter.
//
// Each phase of the converter is a stack of two full-bridge cells, so it
// has eight IGBTs and the converter 24. The controller produces all 24 gate
// pulses in parallel by phase-shifted carrier PWM:
//   * ref_signal_gen reads a 256-entry sine table to give three references
//     120 degrees apart (50 Hz by default);
//   * two carrier_counter instances give 9-bit triangles at 0 and 90 degrees
//     (about 1.5 kHz), two inverter9 instances the 180/270-degree copies;
//   * per phase, a phase_leg_ctrl compares its reference with the four
//     carriers and inserts the deadband between the two IGBTs of every leg.
// Summing the two cells of a phase gives five output levels.
//
// Default parameters are those for a 50 MHz crystal: REF_DIV = 3906
// (50.004 Hz reference), CAR_DIV = 32 (1525.9 Hz carrier), DEADBAND = 32
// carrier counts (32 * 32 * 20 ns = 20.5 us between one IGBT turning off and
// its partner turning on, counted on one carrier slope).
// The carriers, the reference table, the deadband rule and the gate
// assignment follow the description; that the three phases share the two
// carrier counters, and the reset and enable behaviour, are this design's.
//
// Interface (all synchronous to clk):
//   rst        active-high synchronous reset
//   ena        enable; low freezes the carriers and turns every gate off
//   load       high: comparators follow the references; low: hold them
//   sine_type  0 plain sine, 1 third-harmonic-injected sine
//   gate[p]    S1..S8 of phase p (p = 0, 1, 2 for A, B, C), see phase_leg_ctrl
//   dba[p]     deadband flags DBA1..DBA4 of phase p
//   ref_out[p] 9-bit reference of phase p, angle[p] its 16-bit table word
//   car_0, car_90  the two counted carriers
module mmc_controller
  import mmc_pkg::*;
#(
  parameter int unsigned REF_DIV  = DEF_REF_DIV,
  parameter int unsigned CAR_DIV  = DEF_CAR_DIV,
  parameter int unsigned DEADBAND = DEF_DEADBAND
) (
  input  logic            clk,
  input  logic            rst,
  input  logic            ena,
  input  logic            load,
  input  ref_type_e       sine_type,
  output logic [2:0][7:0] gate,
  output logic [2:0][3:0] dba,
  output cnt_t [2:0]      ref_out,
  output sample_t [2:0]   angle,
  output cnt_t            car_0,
  output cnt_t            car_90
);
  cnt_t car_180, car_270;

  ref_signal_gen #(.DIV(REF_DIV)) u_ref (
    .clk      (clk),
    .rst      (rst),
    .sine_type(sine_type),
    .angle_a  (angle[0]),
    .angle_b  (angle[1]),
    .angle_c  (angle[2]),
    .sine_a   (ref_out[0]),
    .sine_b   (ref_out[1]),
    .sine_c   (ref_out[2]),
    .step     ()
  );

  carrier_counter #(.DIV(CAR_DIV), .INIT(cnt_t'(0))) u_top_counter (
    .clk  (clk),
    .rst  (rst),
    .ena  (ena),
    .count(car_0),
    .tick ()
  );

  carrier_counter #(.DIV(CAR_DIV), .INIT(cnt_t'(1 << (CNT_W - 1)))) u_bot_counter (
    .clk  (clk),
    .rst  (rst),
    .ena  (ena),
    .count(car_90),
    .tick ()
  );

  inverter9 u_inv_top (.a(car_0),  .b(car_180));
  inverter9 u_inv_bot (.a(car_90), .b(car_270));

  for (genvar p = 0; p < 3; p++) begin : g_phase
    phase_leg_ctrl #(.DEADBAND(DEADBAND), .DIV(CAR_DIV)) u_leg (
      .clk    (clk),
      .rst    (rst),
      .ena    (ena),
      .load   (load),
      .ref_val(ref_out[p]),
      .car_0  (car_0),
      .car_90 (car_90),
      .car_180(car_180),
      .car_270(car_270),
      .gate   (gate[p]),
      .dba    (dba[p])
    );
  end
endmodule
