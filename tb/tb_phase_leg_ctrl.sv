// tb_phase_leg_ctrl: self-checking testbench for the gate generator of one
// phase leg.
//
// The testbench makes its own four carriers (a 0..511..0 triangle at 0 and
// 90 degrees and their mirrors 511 - x for 180 and 270 degrees) and a slowly
// varying sine reference, and runs the block with DIV = 1. Every cycle each
// of the four leg outputs is compared with the deadband rule applied to the
// carrier that leg must use (S1/S2: 0, S3/S4: 180, S5/S6: 90, S7/S8:
// 270 degrees; the right legs with the gate senses swapped), one cycle
// late. It then forms the cell voltages
// (S1 - S3, S5 - S7, in units of the cell voltage) and the phase voltage as
// their sum, and checks that all five levels -2..+2 occur and that the
// cells switch unipolarly (no negative level in the positive half-cycle and
// no positive level in the negative one). Finally ena is
// dropped and all eight gates must go off.
module tb_phase_leg_ctrl;
  logic       clk = 1'b0;
  logic       rst = 1'b1;
  logic       ena = 1'b0;
  logic [8:0] ref_v = 9'd256;
  logic [8:0] c0 = '0, c90 = '0, c180, c270;
  logic [7:0] gate;
  logic [3:0] dba;
  int checks = 0, failures = 0;
  int level_seen [5];

  always #5 clk = ~clk;
  assign c180 = 9'd511 - c0;
  assign c270 = 9'd511 - c90;

  phase_leg_ctrl #(.DIV(1)) dut (
    .clk(clk), .rst(rst), .ena(ena), .load(1'b1), .ref_val(ref_v),
    .car_0(c0), .car_90(c90), .car_180(c180), .car_270(c270),
    .gate(gate), .dba(dba)
  );

  function automatic int tri_wave(int m);
    m = m % 1024;
    return (m < 512) ? m : 1023 - m;
  endfunction

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s at %0t", what, $time);
    end
  endtask

  initial begin
    int exp_t [4], exp_b [4], car [4];
    int lvl, ref_prev, ref_now;
    ref_now = 256;
    repeat (3) @(posedge clk);
    @(negedge clk);
    rst = 1'b0;
    ena = 1'b1;
    for (int k = 0; k < 40 * 1024; k++) begin
      // values the block samples at the coming edge
      ref_v = 9'($rtoi(255.5 + 255.5 * $sin(6.283185307179586 * k / (20.0 * 1024.0))));
      c0  = 9'(tri_wave(k));
      c90 = 9'(tri_wave(k + 256));
      car[0] = tri_wave(k);             // S1/S2
      car[1] = 511 - tri_wave(k);       // S3/S4
      car[2] = tri_wave(k + 256);       // S5/S6
      car[3] = 511 - tri_wave(k + 256); // S7/S8
      for (int i = 0; i < 4; i++) begin
        // left legs (0, 2): upper on below the reference; right legs (1, 3)
        // run on the mirrored carrier with the senses swapped
        exp_t[i] = int'(car[i] <  int'(ref_v) - 16);
        exp_b[i] = int'(car[i] >= int'(ref_v) + 16);
        if (i % 2 == 1) begin
          int tmp;
          tmp = exp_t[i]; exp_t[i] = exp_b[i]; exp_b[i] = tmp;
        end
      end
      ref_prev = int'(ref_v);
      @(negedge clk);
      for (int i = 0; i < 4; i++) begin
        check(gate[2*i] == exp_t[i][0] && gate[2*i+1] == exp_b[i][0] &&
              dba[i] == (!exp_t[i][0] && !exp_b[i][0]),
              $sformatf("leg %0d at step %0d", i, k));
      end
      // phase voltage, only where no leg is in its deadband
      if (dba == 4'b0) begin
        lvl = (int'(gate[0]) - int'(gate[2])) + (int'(gate[4]) - int'(gate[6]));
        level_seen[lvl + 2]++;
        // unipolar switching: no negative level while the reference is
        // clearly positive, and the other way round
        if (ref_now > 300) check(lvl >= 0, "positive half-cycle: no negative level");
        if (ref_now < 211) check(lvl <= 0, "negative half-cycle: no positive level");
      end
      ref_now = ref_prev;
    end
    for (int l = 0; l < 5; l++)
      check(level_seen[l] > 0, $sformatf("phase level %0d seen %0d times", l - 2, level_seen[l]));
    ena = 1'b0;
    @(negedge clk);
    check(gate == 8'b0 && dba == 4'b0, "all gates off when disabled");
    $display("levels -2..2: %0d %0d %0d %0d %0d", level_seen[0], level_seen[1], level_seen[2], level_seen[3], level_seen[4]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
