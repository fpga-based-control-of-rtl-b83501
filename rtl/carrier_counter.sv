// carrier_counter: triangular carrier generator (9-bit up/down counter).
//
// The counter is stepped by its own clock divider (DIV crystal cycles per
// step). It counts up from its start value to 511, holds there for one step
// while turning round, counts down to 0, holds one step and turns again, so
// one carrier period is exactly 2 * 2^9 = 1024 steps, as Eq. (3) of the
// controller's sizing assumes:  f_carrier = f_clk / (2 * 2^9 * DIV).
// With a 50 MHz clock and DIV = 32 this is 1525.9 Hz (1,500 Hz was the target).
//
// Two instances are used: INIT = 0 gives the 0-degree carrier and INIT = 256
// (9'b100000000) gives the 90-degree carrier, a quarter period ahead. Both
// start counting up. The 180/270-degree carriers are the bitwise inverses.
// Start values, the 9-bit width and the divider formula follow the
// description; the one-step hold at each turning point and the direction at
// reset are this design's choices.
//
// Interface: clk, synchronous active-high rst, ena (freezes the carrier when
// low), count (the carrier), tick (one-cycle pulse on every counter step).
// Timing: count changes in the cycle after tick is high.
module carrier_counter
  import mmc_pkg::*;
#(
  parameter int unsigned DIV  = DEF_CAR_DIV,
  parameter cnt_t        INIT = '0
) (
  input  logic clk,
  input  logic rst,
  input  logic ena,
  output cnt_t count,
  output logic tick
);
  logic up;   // counting direction, 1 = up

  clk_divider #(.DIV(DIV)) u_div (
    .clk (clk),
    .rst (rst),
    .en  (ena),
    .tick(tick)
  );

  always_ff @(posedge clk) begin
    if (rst) begin
      count <= INIT;
      up    <= 1'b1;
    end else if (tick) begin
      if (up) begin
        if (count == cnt_t'(CNT_MAX)) up <= 1'b0;     // turn at the top
        else                          count <= count + 1'b1;
      end else begin
        if (count == '0)              up <= 1'b1;     // turn at the bottom
        else                          count <= count - 1'b1;
      end
    end
  end
endmodule
