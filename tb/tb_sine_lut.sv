// tb_sine_lut: self-checking testbench for the reference look-up table.
//
// Reads all 512 words (plain sine and third-harmonic sine) and compares each
// with the formula evaluated here in real arithmetic:
//   sine:  32767.5 + 32767.5 * sin(2*pi*n/256)
//   THPWM: 32767.5 + 32767.5 * 2/sqrt(3) * (sin(t) + sin(3t)/6)
// allowing one LSB for rounding. Also checks the twelve known entries
// (16'h8000, 8324, 8647, 896a, 8c8b, 8fab at the start of the table and
// 6d38, 7054, 7374, 7695, 79b8, 7cdb at its end) exactly, and the one-cycle
// read latency.
module tb_sine_lut;
  logic        clk = 1'b0;
  logic        sel;
  logic [7:0]  addr;
  logic [15:0] data;
  int checks = 0, failures = 0;

  localparam logic [15:0] HEAD [6] = '{16'h8000, 16'h8324, 16'h8647, 16'h896a, 16'h8c8b, 16'h8fab};
  localparam logic [15:0] TAIL [6] = '{16'h6d38, 16'h7054, 16'h7374, 16'h7695, 16'h79b8, 16'h7cdb};

  always #5 clk = ~clk;

  sine_lut dut (.clk(clk), .sel(sel), .addr(addr), .data(data));

  function automatic real expect_val(int s, int n);
    real th = 6.283185307179586 * n / 256.0;
    if (s == 0) return 32767.5 + 32767.5 * $sin(th);
    return 32767.5 + 32767.5 * (2.0 / $sqrt(3.0)) * ($sin(th) + $sin(3.0 * th) / 6.0);
  endfunction

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s at %0t", what, $time);
    end
  endtask

  initial begin
    for (int s = 0; s < 2; s++) begin
      for (int n = 0; n < 256; n++) begin
        real e, d;
        @(negedge clk);
        sel  = s[0];
        addr = 8'(n);
        @(posedge clk);
        #1;
        e = expect_val(s, n);
        d = real'(data) - e;
        check(d <= 1.0 && d >= -1.0, $sformatf("table %0d entry %0d = %0d, expected %f", s, n, data, e));
        if (s == 0 && n < 6)    check(data == HEAD[n],       $sformatf("known entry %0d", n));
        if (s == 0 && n >= 250) check(data == TAIL[n - 250], $sformatf("known entry %0d", n));
      end
    end
    // Read latency: a new address shows only after the next clock edge.
    @(negedge clk); sel = 1'b0; addr = 8'd64;
    @(posedge clk); #1;
    check(data == 16'hffff, "sine peak at entry 64");
    @(negedge clk); addr = 8'd192;
    #1;
    check(data == 16'hffff, "output holds until the clock edge");
    @(posedge clk); #1;
    check(data == 16'h0000, "sine trough at entry 192");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
