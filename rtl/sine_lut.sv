// sine_lut: the reference look-up table, one synchronous read port.
//
// The table holds one period of the reference sampled at 256 points as
// unsigned 16-bit words:
//   S(n) = A/2 + A/2 * f(360 deg * n / 256),  A = 65535,  rounded,
// so entry 0 is 16'h8000, entry 1 is 16'h8324 and entry 255 is 16'h7cdb.
// Two waveforms are stored, selected by sel:
//   sel = 0: f(t) = sin(t)                              (plain sine, SPWM)
//   sel = 1: f(t) = 2/sqrt(3) * (sin(t) + sin(3t)/6)    (third harmonic, THPWM)
// The third-harmonic curve is scaled so that its peak is again full scale.
// The contents are computed at elaboration from the formula above; nothing
// is read from a file. The sine table follows the description (Eq. 1 with
// A = 65535 and 256 entries); the second table and its scaling are this
// design's own choice.
//
// Interface: clk, sel, addr (8 bits), data (16 bits).
// Timing: data is valid one clk cycle after addr/sel (block-RAM style).
module sine_lut
  import mmc_pkg::*;
(
  input  logic              clk,
  input  logic              sel,
  input  logic [LUT_AW-1:0] addr,
  output sample_t           data
);
  typedef sample_t table_t [2*LUT_DEPTH];

  function automatic table_t make_table();
    table_t    t;
    real       th, v;
    localparam real TWO_PI = 6.283185307179586;
    localparam real HALF_A = 32767.5;
    for (int n = 0; n < int'(LUT_DEPTH); n++) begin
      th = TWO_PI * real'(n) / real'(LUT_DEPTH);
      // plain sine
      v = HALF_A + HALF_A * $sin(th);
      t[n] = sample_t'($rtoi(v + 0.5));
      // sine with one sixth third harmonic, rescaled to full range
      v = HALF_A + HALF_A * (2.0 / $sqrt(3.0)) * ($sin(th) + $sin(3.0 * th) / 6.0);
      if (v > 65535.0) v = 65535.0;
      if (v < 0.0)     v = 0.0;
      t[LUT_DEPTH + n] = sample_t'($rtoi(v + 0.5));
    end
    return t;
  endfunction

  localparam table_t ROM = make_table();

  always_ff @(posedge clk) data <= ROM[{sel, addr}];
endmodule
