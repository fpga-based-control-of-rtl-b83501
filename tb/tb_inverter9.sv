// tb_inverter9: exhaustive check of the 9-bit carrier inverter.
//
// For every 9-bit input the output must be 511 - input, i.e. the triangle
// mirrored about its mid-level (a 180-degree phase shift of the carrier).
module tb_inverter9;
  logic [8:0] a, b;
  int checks = 0, failures = 0;

  inverter9 dut (.a(a), .b(b));

  initial begin
    for (int i = 0; i < 512; i++) begin
      a = 9'(i);
      #1;
      checks++;
      if (int'(b) != 511 - i) begin
        failures++;
        $display("FAIL a=%0d b=%0d", i, b);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
