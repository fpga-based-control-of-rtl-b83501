// tb_pwm_comparator: self-checking testbench for the comparator/deadband
// block of one half-bridge leg.
//
// Part 1 drives a left-leg and a right-leg DIV = 2 instance with random
// reference, carrier, load and ena values and compares every output, every
// cycle, with a reference model written here: on each divider tick the
// comparison value is ref (load = 1) or the held one; for the left leg
// top = (count < cmp - 16), bottom = (count >= cmp + 16), for the right leg
// the two swapped; deadband flag = neither; ena low clears all three.
// Part 2 sweeps a DIV = 1 instance with a triangular carrier (0..511..0) at
// several references and measures the deadband: between the top gate
// turning off and the bottom one turning on (and back) the flag must be high
// for exactly DEADBAND = 32 carrier steps; at references 0 and 511 one gate
// must stay off all period. (Near the ends of the range one deadband
// interval merges with the turning point of the carrier, so the 32-step
// check is made for references 16..495.) Both gates on together is counted as a failure.
module tb_pwm_comparator;
  logic clk = 1'b0;
  logic rst = 1'b1;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s at %0t", what, $time);
    end
  endtask

  // ---------------- part 1: random stimulus against a model ----------------
  logic       ena_r = 1'b0, load_r = 1'b0;
  logic [8:0] ref_r = '0, cnt_r = '0;
  logic       t_r, b_r, d_r;
  logic       t_rr, b_rr, d_rr;
  pwm_comparator #(.DIV(2)) dut_r (
    .clk(clk), .rst(rst), .ena(ena_r), .load(load_r), .ref_val(ref_r),
    .count(cnt_r), .pwm_t(t_r), .pwm_b(b_r), .dba(d_r)
  );
  // right-leg comparator on the same stimulus: gate senses swapped
  pwm_comparator #(.DIV(2), .RIGHT_LEG(1'b1)) dut_rr (
    .clk(clk), .rst(rst), .ena(ena_r), .load(load_r), .ref_val(ref_r),
    .count(cnt_r), .pwm_t(t_rr), .pwm_b(b_rr), .dba(d_rr)
  );

  // ---------------- part 2: triangle sweep, DIV = 1 ----------------
  logic       ena_s = 1'b0;
  logic [8:0] ref_s = '0, cnt_s = '0;
  logic       t_s, b_s, d_s;
  pwm_comparator #(.DIV(1)) dut_s (
    .clk(clk), .rst(rst), .ena(ena_s), .load(1'b1), .ref_val(ref_s),
    .count(cnt_s), .pwm_t(t_s), .pwm_b(b_s), .dba(d_s)
  );

  int  m_cmp = 0, n_en = 0;
  bit  m_t = 0, m_b = 0, m_d = 0;
  int  n_db_runs = 0, n_hold = 0;

  initial begin
    repeat (3) @(posedge clk);
    @(negedge clk);
    rst = 1'b0;
    // part 1
    for (int c = 0; c < 20000; c++) begin
      int  cmp_eff;
      bit  tick;
      ena_r  = ($urandom_range(0, 15) != 0);
      load_r = ($urandom_range(0, 3) != 0);
      ref_r  = 9'($urandom_range(0, 511));
      cnt_r  = 9'($urandom_range(0, 511));
      if (!load_r && ena_r) n_hold++;
      // model of the coming clock edge
      if (ena_r) n_en++;
      tick    = ena_r && (n_en % 2 == 0);
      cmp_eff = load_r ? int'(ref_r) : m_cmp;
      if (!ena_r) begin
        m_t = 0; m_b = 0; m_d = 0;
      end else if (tick) begin
        m_cmp = cmp_eff;
        m_t = int'(cnt_r) <  cmp_eff - 16;
        m_b = int'(cnt_r) >= cmp_eff + 16;
        m_d = !m_t && !m_b;
      end
      @(negedge clk);
      check(t_r == m_t && b_r == m_b && d_r == m_d,
            $sformatf("random: got t%0d b%0d d%0d expected t%0d b%0d d%0d", t_r, b_r, d_r, m_t, m_b, m_d));
      check(!(t_r && b_r), "random: both gates on");
      check(t_rr == m_b && b_rr == m_t && d_rr == m_d,
            $sformatf("random right leg: got t%0d b%0d d%0d", t_rr, b_rr, d_rr));
      check(!(t_rr && b_rr), "random right leg: both gates on");
    end
    check(n_hold > 1000, "held comparison value exercised");

    // part 2
    ena_s = 1'b1;
    foreach (sweep_refs[i]) begin
      int run, t_on, b_on;
      bit prev_d;
      run = 0; t_on = 0; b_on = 0; prev_d = 0;
      ref_s = 9'(sweep_refs[i]);
      for (int k = 0; k < 3 * 1024; k++) begin
        int m;
        m = k % 1024;
        cnt_s = 9'((m < 512) ? m : 1023 - m);
        @(negedge clk);
        check(!(t_s && b_s), "sweep: both gates on");
        if (k >= 1024) begin
          if (t_s) t_on++;
          if (b_s) b_on++;
          if (d_s) run++;
          if (prev_d && !d_s && sweep_refs[i] >= 16 && sweep_refs[i] <= 495) begin
            check(run == 32, $sformatf("sweep ref %0d: deadband of %0d steps", sweep_refs[i], run));
            n_db_runs++;
          end
          if (!d_s) run = 0;
        end
        prev_d = d_s;
      end
      if (sweep_refs[i] == 0)   check(t_on == 0, "ref 0: top gate never on");
      if (sweep_refs[i] == 511) check(b_on == 0, "ref 511: bottom gate never on");
      // The top gate is on while count < ref - 16: 2 * (ref - 16) steps per
      // 1024-step period (count values 0..ref-17 on both slopes).
      if (sweep_refs[i] >= 16)
        check(t_on == 2 * 2 * (sweep_refs[i] - 16),
              $sformatf("sweep ref %0d: top on %0d steps", sweep_refs[i], t_on));
    end
    check(n_db_runs >= 10, "deadband intervals seen");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  localparam int sweep_refs [6] = '{0, 17, 100, 256, 400, 511};

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
