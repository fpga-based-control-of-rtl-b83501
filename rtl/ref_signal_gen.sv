// ref_signal_gen: three-phase sine reference generator.
//
// A table index advances by one entry every DIV clock cycles (the reference
// clock divider), so the reference frequency is f_clk / (256 * DIV): 50.004 Hz
// for a 50 MHz clock and DIV = 3906 (Eq. 2). Phase A reads the table at the
// index, phases B and C at the index plus 171 and 85 entries (120 and 240
// degrees behind, rounded to whole entries). Each phase has its own read
// port of the look-up table. The 16-bit table word is output as angle_x;
// its top nine bits form the 9-bit reference sine_x (0..511) that the
// comparators hold against the 9-bit carriers.
//
// sine_type selects plain sine (0) or third-harmonic-injected sine (1);
// codes 2 and 3 give plain sine. The 256-entry table, its formula and the
// divider follow the description; the phase offsets for B and C, the
// 16-to-9-bit scaling and the sine_type encoding are this design's choices.
//
// Interface: clk, synchronous active-high rst, sine_type[1:0],
// angle_a/b/c[15:0], sine_a/b/c[8:0], step (one-cycle pulse per index step).
// Timing: the outputs follow an index step after one cycle (table read).
module ref_signal_gen
  import mmc_pkg::*;
#(
  parameter int unsigned DIV = DEF_REF_DIV
) (
  input  logic        clk,
  input  logic        rst,
  input  ref_type_e   sine_type,
  output sample_t     angle_a,
  output sample_t     angle_b,
  output sample_t     angle_c,
  output cnt_t        sine_a,
  output cnt_t        sine_b,
  output cnt_t        sine_c,
  output logic        step
);
  logic [LUT_AW-1:0] idx;
  logic              sel;

  clk_divider #(.DIV(DIV)) u_div (
    .clk (clk),
    .rst (rst),
    .en  (1'b1),
    .tick(step)
  );

  always_ff @(posedge clk) begin
    if (rst)       idx <= '0;
    else if (step) idx <= idx + 1'b1;
  end

  assign sel = (sine_type == REF_THPWM);

  sine_lut u_lut_a (.clk(clk), .sel(sel), .addr(idx),          .data(angle_a));
  sine_lut u_lut_b (.clk(clk), .sel(sel), .addr(idx + OFFS_B), .data(angle_b));
  sine_lut u_lut_c (.clk(clk), .sel(sel), .addr(idx + OFFS_C), .data(angle_c));

  assign sine_a = angle_a[SAMPLE_W-1 -: CNT_W];
  assign sine_b = angle_b[SAMPLE_W-1 -: CNT_W];
  assign sine_c = angle_c[SAMPLE_W-1 -: CNT_W];
endmodule
