// tb_mmc_controller: end-to-end testbench of the three-phase controller at
// its default parameters (50 MHz clock, 50 Hz reference, ~1.5 kHz carrier,
// 32-count deadband).
//
// Sequence: reset; one full reference period (256 table steps, 999,936
// cycles) with plain sine; one full period with third-harmonic sine; two
// carrier periods with load low (references held); then ena low.
// What is checked, every cycle unless stated:
//   * the two carriers against an independent model: a step every 32 cycles,
//     tri(k) and tri(k + 256), frozen while ena is low;
//   * the three 16-bit references against the table formula at the table
//     step the testbench counts itself (one step per 3906 cycles), with
//     phases B and C at +171 and +85 entries, for both reference types;
//   * that no half-bridge leg ever has both gates on (shoot-through);
//   * the dead time of every handover between the two gates of a leg (at
//     least (32 - 12) carrier steps; the reference may move meanwhile),
//     except in the carrier period after a reference-type switch, where the
//     reference jumps and one dead time may be shorter;
//   * per phase, that all five output levels -2..+2 occur, and that the
//     line voltage A - B takes all nine levels -4..+4;
//   * the number of S1 pulses per reference period (carrier/reference
//     frequency ratio, 1525.9 / 50.004 = 30.5);
//   * with load low, that the gate pattern repeats exactly from one carrier
//     period to the next; with ena low, that every gate is off.
// Each mechanism (deadband, 90-degree carrier, carrier inversion,
// reference-type switch, load hold, disable) is counted; one that never
// happened counts as a failure.
module tb_mmc_controller;
  import mmc_pkg::*;
  localparam int REF_DIV  = DEF_REF_DIV;
  localparam int CAR_DIV  = DEF_CAR_DIV;
  localparam int CAR_PER  = 1024 * CAR_DIV;      // 32768 cycles
  localparam int REF_PER  = 256 * REF_DIV;       // 999936 cycles

  logic            clk = 1'b0;
  logic            rst = 1'b1;
  logic            ena = 1'b0;
  logic            load = 1'b1;
  ref_type_e       st = REF_SINE;
  logic [2:0][7:0] gate;
  logic [2:0][3:0] dba;
  cnt_t [2:0]      ref_out;
  sample_t [2:0]   angle;
  cnt_t            car_0, car_90;

  always #10 clk = ~clk;   // 50 MHz

  mmc_controller dut (
    .clk(clk), .rst(rst), .ena(ena), .load(load), .sine_type(st),
    .gate(gate), .dba(dba), .ref_out(ref_out), .angle(angle),
    .car_0(car_0), .car_90(car_90)
  );

  int checks = 0, failures = 0;
  int shoot = 0;
  int n_db = 0, min_db = 1 << 30;
  int n_car90 = 0, n_inv = 0, n_thpwm = 0, n_hold = 0, n_off = 0;
  int db_len [3][4];
  int last_on [3][4];   // 1: top gate, 2: bottom gate was on last
  int level_seen [3][5];
  int line_seen [9];     // line voltage A - B, levels -4..+4
  int plvl [3];
  int sa1_pulses = 0;
  int settle = 0;       // cycles left in which a reference jump may shorten dead time
  int car_steps = 0, car_div_cnt = 0;
  int ref_steps = 0, ref_div_cnt = 0;
  bit sel_prev = 0;
  int ref_steps_prev = 0;
  logic prev_sa1 = 1'b0;
  logic [2:0][3:0] prev_dba = '0;
  logic [2:0][7:0] pattern [CAR_PER];

  function automatic int tri_wave(int m);
    m = m % 1024;
    return (m < 512) ? m : 1023 - m;
  endfunction

  function automatic real table_val(bit s, int n);
    real th;
    th = 6.283185307179586 * (n % 256) / 256.0;
    if (!s) return 32767.5 + 32767.5 * $sin(th);
    return 32767.5 + 32767.5 * (2.0 / $sqrt(3.0)) * ($sin(th) + $sin(3.0 * th) / 6.0);
  endfunction

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL %s at %0t", what, $time);
    end
  endtask

  localparam int OFFS [3] = '{0, 171, 85};

  // One clock cycle of checks, called at each negedge after the posedge
  // that the model counters describe.
  task automatic cycle_checks(input bit count_levels);
    real d;
    int  lvl;
    // carriers
    check(car_0 == 9'(tri_wave(car_steps)) && car_90 == 9'(tri_wave(car_steps + 256)),
          $sformatf("carriers %0d/%0d at step %0d", car_0, car_90, car_steps));
    if (car_90 != car_0) n_car90++;
    // references: output shows the table step and type of the previous cycle
    for (int p = 0; p < 3; p++) begin
      d = real'(angle[p]) - table_val(sel_prev, ref_steps_prev + OFFS[p]);
      check(d <= 1.0 && d >= -1.0, $sformatf("phase %0d reference %0d", p, angle[p]));
    end
    // gates
    for (int p = 0; p < 3; p++) begin
      for (int l = 0; l < 4; l++) begin
        if (gate[p][2*l] && gate[p][2*l+1]) shoot++;
        if (dba[p][l]) db_len[p][l]++;
        else if (prev_dba[p][l]) begin
          n_db++;
          // a dead time is a handover from one gate of the leg to the other
          if (ena && last_on[p][l] != 0 && last_on[p][l] != (gate[p][2*l] ? 1 : 2)
              && settle == 0 && db_len[p][l] < min_db)
            min_db = db_len[p][l];
          db_len[p][l] = 0;
        end
        if (gate[p][2*l])   last_on[p][l] = 1;
        if (gate[p][2*l+1]) last_on[p][l] = 2;
      end
      lvl = (int'(gate[p][0]) - int'(gate[p][2])) + (int'(gate[p][4]) - int'(gate[p][6]));
      plvl[p] = lvl;
      if (count_levels && dba[p] == 4'b0) level_seen[p][lvl + 2]++;
      // right leg of each cell uses the inverted carrier: both legs of a
      // cell switching in opposite senses shows the 180-degree copy at work
      if (gate[p][0] != gate[p][2] && dba[p][1:0] == 2'b00) n_inv++;
    end
    // line voltage A - B, where neither phase has a leg in its deadband
    if (dba[0] == 4'b0 && dba[1] == 4'b0) line_seen[plvl[0] - plvl[1] + 4]++;
    if (gate[0][0] && !prev_sa1) sa1_pulses++;
    prev_sa1 = gate[0][0];
    prev_dba = dba;
    if (settle > 0) settle--;
  endtask

  // Advance the model counters for the posedge that is about to happen.
  task automatic model_step();
    ref_steps_prev = ref_steps;
    sel_prev = (st == REF_THPWM);
    if (ena) begin
      car_div_cnt++;
      if (car_div_cnt == CAR_DIV) begin
        car_div_cnt = 0;
        car_steps++;
      end
    end
    ref_div_cnt++;
    if (ref_div_cnt == REF_DIV) begin
      ref_div_cnt = 0;
      ref_steps++;
    end
  endtask

  initial begin
    int pulses_sine;
    repeat (3) @(posedge clk);
    @(negedge clk);
    rst = 1'b0;
    ena = 1'b1;
    // the reset value is visible now; model the first edge
    model_step();
    // ---- one reference period, plain sine ----
    for (int c = 0; c < REF_PER; c++) begin
      @(negedge clk);
      cycle_checks(1'b1);
      model_step();
    end
    pulses_sine = sa1_pulses;
    $display("S1 pulses in one 50 Hz period: %0d", pulses_sine);
    check(pulses_sine >= 28 && pulses_sine <= 31, "carrier/reference ratio");
    check(ref_steps == 256, "256 table steps per reference period");
    // ---- one reference period, third-harmonic sine ----
    st = REF_THPWM;
    settle = CAR_PER;
    sel_prev = 1'b1;   // the type takes effect at the next edge
    ref_steps_prev = ref_steps;
    for (int c = 0; c < REF_PER; c++) begin
      @(negedge clk);
      cycle_checks(1'b0);
      n_thpwm++;
      model_step();
    end
    // ---- load low: references held, pattern must repeat ----
    st = REF_SINE;
    settle = CAR_PER;
    sel_prev = 1'b0;
    @(negedge clk);
    cycle_checks(1'b0);
    model_step();
    load = 1'b0;
    // let the held value reach every comparator (one divider period)
    repeat (2 * CAR_DIV) begin
      @(negedge clk);
      cycle_checks(1'b0);
      model_step();
    end
    for (int c = 0; c < CAR_PER; c++) begin
      @(negedge clk);
      cycle_checks(1'b0);
      model_step();
      pattern[c] = gate;
    end
    for (int c = 0; c < CAR_PER; c++) begin
      @(negedge clk);
      cycle_checks(1'b0);
      model_step();
      if (gate == pattern[c]) n_hold++;
    end
    check(n_hold == CAR_PER, $sformatf("held pattern repeats (%0d of %0d cycles)", n_hold, CAR_PER));
    // ---- ena low ----
    load = 1'b1;
    ena  = 1'b0;
    @(negedge clk);
    cycle_checks(1'b0);
    model_step();
    for (int c = 0; c < 4 * CAR_DIV; c++) begin
      @(negedge clk);
      cycle_checks(1'b0);
      model_step();
      check(gate == '0 && dba == '0, "gates off while disabled");
      n_off++;
    end

    check(shoot == 0, $sformatf("shoot-through in %0d cycles", shoot));
    check(min_db >= (32 - 12) * CAR_DIV, $sformatf("shortest dead time %0d cycles", min_db));
    for (int p = 0; p < 3; p++)
      for (int l = 0; l < 5; l++)
        check(level_seen[p][l] > 0, $sformatf("phase %0d level %0d", p, l - 2));
    for (int l = 0; l < 9; l++)
      check(line_seen[l] > 0, $sformatf("line voltage level %0d", l - 4));
    $display("line A-B levels -4..4: %0d %0d %0d %0d %0d %0d %0d %0d %0d", line_seen[0], line_seen[1], line_seen[2], line_seen[3], line_seen[4], line_seen[5], line_seen[6], line_seen[7], line_seen[8]);
    check(n_db > 0,    "mechanism: deadband");
    check(n_car90 > 0, "mechanism: 90-degree carrier");
    check(n_inv > 0,   "mechanism: inverted carrier");
    check(n_thpwm > 0, "mechanism: reference-type switch");
    check(n_hold > 0,  "mechanism: load hold");
    check(n_off > 0,   "mechanism: disable");
    $display("deadband intervals %0d, shortest %0d cycles (%0d ns)", n_db, min_db, min_db * 20);
    $display("phase A levels -2..2: %0d %0d %0d %0d %0d", level_seen[0][0], level_seen[0][1],
             level_seen[0][2], level_seen[0][3], level_seen[0][4]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2 * REF_PER + 4 * CAR_PER) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
