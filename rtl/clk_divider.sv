// clk_divider: divides the crystal clock by DIV.
//
// The FPGA's crystal clock is too fast for the reference table and the
// carrier counters, so each of them is stepped by a clock divider. Rather
// than generating a slow derived clock from a counter bit, this divider emits
// a one-cycle clock-enable pulse (tick) every DIV cycles of clk, so that the
// whole controller stays in one clock domain. DIV = 32 gives exactly the
// same rate as taking bit 4 of a free-running counter.
//
// Interface: clk, synchronous active-high rst, en (hold when low),
// tick (high for one clk cycle when the count wraps).
// Timing: after reset, tick is high in the DIV-th enabled cycle, then every
// DIV enabled cycles. DIV = 1 gives tick = en.
module clk_divider #(
  parameter int unsigned DIV = 32
) (
  input  logic clk,
  input  logic rst,
  input  logic en,
  output logic tick
);
  localparam int unsigned W = (DIV > 1) ? $clog2(DIV) : 1;

  logic [W-1:0] cnt;

  always_ff @(posedge clk) begin
    if (rst) begin
      cnt <= '0;
    end else if (en) begin
      if (cnt == W'(DIV - 1)) cnt <= '0;
      else                    cnt <= cnt + 1'b1;
    end
  end

  assign tick = en && (cnt == W'(DIV - 1));

  initial assert (DIV >= 1) else $error("clk_divider: DIV must be at least 1");
endmodule
