// inverter9: 180-degree phase shifter for a triangular carrier.
//
// A triangular carrier that sweeps 0..2^W-1 and back is shifted by half a
// period when every bit is inverted, because ~x = (2^W - 1) - x mirrors the
// triangle about its mid-level. The controller needs four carriers per phase
// leg (0, 90, 180 and 270 degrees) but counts only two of them; the other two
// are produced by this block. Purely combinational, no latency.
//
// Interface: a (carrier in), b (inverted carrier out), both W = 9 bits.
module inverter9 #(
  parameter int unsigned W = mmc_pkg::CNT_W
) (
  input  logic [W-1:0] a,
  output logic [W-1:0] b
);
  always_comb b = ~a;
endmodule
