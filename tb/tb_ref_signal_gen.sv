// tb_ref_signal_gen: self-checking testbench for the three-phase reference.
//
// With the divider shortened to DIV = 4, the table index must advance every
// 4 cycles, so one reference period takes 256 * 4 cycles. Every cycle the
// three outputs are compared with the table formula evaluated here:
// phase A at step k, phase B at k + 171, phase C at k + 85 (B and C lag A by
// 120 and 240 degrees), within one LSB, and each 9-bit reference must be the
// top nine bits of its 16-bit word. The reference type is switched from
// plain sine to third-harmonic sine half-way, and back. The testbench also
// checks that the phase-A reference returns to mid-scale once per period.
module tb_ref_signal_gen;
  import mmc_pkg::*;
  localparam int DIV = 4;
  logic      clk = 1'b0;
  logic      rst = 1'b1;
  ref_type_e st  = REF_SINE;
  sample_t   ang [3];
  cnt_t      sn  [3];
  logic      step;
  int checks = 0, failures = 0;
  int k = 0, k_prev = 0, cyc = 0, mid_hits = 0, n_thpwm = 0;
  bit sel_prev = 1'b0;

  always #5 clk = ~clk;

  ref_signal_gen #(.DIV(DIV)) dut (
    .clk(clk), .rst(rst), .sine_type(st),
    .angle_a(ang[0]), .angle_b(ang[1]), .angle_c(ang[2]),
    .sine_a(sn[0]), .sine_b(sn[1]), .sine_c(sn[2]),
    .step(step)
  );

  function automatic real expect_val(bit s, int n);
    real th = 6.283185307179586 * (n % 256) / 256.0;
    if (!s) return 32767.5 + 32767.5 * $sin(th);
    return 32767.5 + 32767.5 * (2.0 / $sqrt(3.0)) * ($sin(th) + $sin(3.0 * th) / 6.0);
  endfunction

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s at %0t", what, $time);
    end
  endtask

  localparam int OFFS [3] = '{0, 171, 85};

  initial begin
    repeat (3) @(posedge clk);
    rst <= 1'b0;
    @(posedge clk);
    @(negedge clk);
    k = 0; k_prev = 0;
    for (cyc = 0; cyc < 3 * 256 * DIV; cyc++) begin
      // output now reflects the index and type of the previous cycle
      for (int p = 0; p < 3; p++) begin
        real d;
        d = real'(ang[p]) - expect_val(sel_prev, k_prev + OFFS[p]);
        check(d <= 1.0 && d >= -1.0, $sformatf("phase %0d word %0d at step %0d", p, ang[p], k_prev));
        check(sn[p] == ang[p][15:7], "9-bit reference is the top of the word");
      end
      check(step == ((cyc % DIV) == DIV - 2), "index steps every DIV cycles");
      if (k_prev % 256 == 0 && !sel_prev && ang[0] == 16'h8000) mid_hits++;
      if (sel_prev) n_thpwm++;
      k_prev   = k;
      if (step) k++;
      st = (cyc >= 256 * DIV && cyc < 2 * 256 * DIV) ? REF_THPWM : REF_SINE;
      sel_prev = (st == REF_THPWM);   // type the table reads at the next edge
      @(negedge clk);
    end
    check(k == 3 * 256, "768 steps in three reference periods");
    check(mid_hits >= 2, "phase A back at the start of the table each period");
    check(n_thpwm > 0, "third-harmonic reference exercised");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
