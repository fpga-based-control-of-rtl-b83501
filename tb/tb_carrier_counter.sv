// tb_carrier_counter: self-checking testbench for the triangular carrier.
//
// Two counters with a small divider (DIV = 3) and start values 0 and 256
// run side by side, as the 0- and 90-degree carriers do. After k counter
// steps the expected value is tri((k + INIT) mod 1024), where
// tri(m) = m for m < 512 and 1023 - m otherwise. The check runs over three
// carrier periods, with ena dropped now and then (the carrier must freeze),
// and measures the period: 1024 steps = 1024 * DIV clock cycles, i.e. the
// rate of Eq. (3).
module tb_carrier_counter;
  localparam int DIV = 3;
  logic clk = 1'b0;
  logic rst = 1'b1;
  logic ena = 1'b0;
  logic [8:0] c0, c90;
  logic t0, t90;
  int checks = 0, failures = 0;
  int k = 0;                 // counter steps since reset
  int cyc = 0, last_zero = 0, period = 0, zeros = 0;

  always #5 clk = ~clk;

  carrier_counter #(.DIV(DIV), .INIT(9'd0))   dut0  (.clk(clk), .rst(rst), .ena(ena), .count(c0),  .tick(t0));
  carrier_counter #(.DIV(DIV), .INIT(9'd256)) dut90 (.clk(clk), .rst(rst), .ena(ena), .count(c90), .tick(t90));

  function automatic int tri_wave(int m);
    m = m % 1024;
    return (m < 512) ? m : 1023 - m;
  endfunction

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s at %0t (k=%0d c0=%0d c90=%0d)", what, $time, k, c0, c90);
    end
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst <= 1'b0;
    ena <= 1'b1;
    // first period: ena always high, measure the period
    while (k < 3 * 1024 + 10) begin
      @(negedge clk);
      cyc++;
      check(c0  == 9'(tri_wave(k)),       "0-degree carrier value");
      check(c90 == 9'(tri_wave(k + 256)), "90-degree carrier value");
      check(t0 == t90, "both dividers step together");
      if (t0) k++;
      if (k >= 2048 && ena == 1'b1 && cyc % 97 == 0) ena <= 1'b0;
      else ena <= 1'b1;
      // period: clock cycles between step 1024 and step 2048
      if (t0 && k == 1024) last_zero = cyc;
      if (t0 && k == 2048) period = cyc - last_zero;
      if (t0 && tri_wave(k) == 0) zeros++;
    end
    check(period == 1024 * DIV, "carrier period is 2*2^9 steps");
    check(zeros >= 6, "carrier reached its bottom in three periods");
    $display("carrier period %0d cycles", period);
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
