// tb_clk_divider: self-checking testbench for clk_divider.
//
// Runs a divide-by-5 and a divide-by-1 instance with a random enable and
// compares every tick with an independent count of enabled cycles: the
// divide-by-5 tick must be high exactly in enabled cycles number 5, 10, 15...
// after reset, the divide-by-1 tick must equal the enable. Also checks that
// the divide-by-32 instance (the carrier divider) ticks at f_clk/32.
module tb_clk_divider;
  logic clk = 1'b0;
  logic rst = 1'b1;
  logic en  = 1'b0;
  logic tick5, tick1, tick32;
  int   checks = 0, failures = 0;
  int   n_en = 0;        // enabled cycles since reset
  int   n_tick32 = 0;

  always #5 clk = ~clk;

  clk_divider #(.DIV(5))  dut5  (.clk(clk), .rst(rst), .en(en),   .tick(tick5));
  clk_divider #(.DIV(1))  dut1  (.clk(clk), .rst(rst), .en(en),   .tick(tick1));
  clk_divider #(.DIV(32)) dut32 (.clk(clk), .rst(rst), .en(1'b1), .tick(tick32));

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s at %0t", what, $time);
    end
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst <= 1'b0;
    for (int c = 0; c < 3200; c++) begin
      en <= ($urandom_range(0, 3) != 0);
      @(negedge clk);
      if (en) n_en++;
      check(tick5 == (en && (n_en % 5 == 0)), "divide-by-5 tick position");
      check(tick1 == en, "divide-by-1 tick equals enable");
      if (tick32) n_tick32++;
      @(posedge clk);
    end
    // 3200 free-running cycles divided by 32
    check(n_tick32 == 100, "divide-by-32 rate");
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
