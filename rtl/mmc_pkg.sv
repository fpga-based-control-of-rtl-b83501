// mmc_pkg: constants and types shared by the modular multilevel converter
// (MMC) switching controller.
//
// The controller compares a look-up-table sine reference with 9-bit
// triangular carriers. Everything that the blocks must agree on lives here:
// the 9-bit carrier/reference width, the 256-entry 16-bit sine table, the
// deadband and the default divider ratios for a 50 MHz crystal.
//
// Numbers from the converter description: 9-bit up/down carriers, 256 table
// entries of 16 bits, deadband of 32 counts, 50 Hz reference, 1,500 Hz
// carrier, 50 MHz clock (20 ns period). The reference-type encoding is this
// design's own choice.
package mmc_pkg;

  // Carrier and reference width (9-bit up/down counters).
  localparam int unsigned CNT_W     = 9;
  localparam int unsigned CNT_MAX   = (1 << CNT_W) - 1;   // 511
  // One carrier period is 2 * 2^9 = 1024 divided-clock ticks.

  // Sine look-up table: 256 entries of 16 bits.
  localparam int unsigned LUT_AW    = 8;
  localparam int unsigned LUT_DEPTH = 1 << LUT_AW;
  localparam int unsigned SAMPLE_W  = 16;

  // Deadband between the top and bottom IGBT of a half-bridge, in carrier
  // counts (9'b000100000 = 32). Half of it is applied on each side.
  localparam int unsigned DEF_DEADBAND = 32;

  // Clock dividers for a 50 MHz crystal.
  //   reference: k_R = 50e6 / (256 * 50 Hz)      = 3906  -> 50.004 Hz
  //   carrier:   k_C = 50e6 / (2 * 2^9 * 1500 Hz) = 32.55 -> 32 -> 1525.9 Hz
  localparam int unsigned DEF_REF_DIV  = 3906;
  localparam int unsigned DEF_CAR_DIV  = 32;

  // Three-phase table offsets: B lags A by 120 degrees, C by 240 degrees.
  // 256 is not divisible by 3, so the offsets are rounded to 171 and 85
  // entries (-120 deg = +240 deg = +170.7 entries).
  localparam logic [LUT_AW-1:0] OFFS_B = 8'd171;
  localparam logic [LUT_AW-1:0] OFFS_C = 8'd85;

  typedef logic [CNT_W-1:0]    cnt_t;
  typedef logic [SAMPLE_W-1:0] sample_t;

  // Reference waveform type, selected by the two SineType switches.
  typedef enum logic [1:0] {
    REF_SINE  = 2'b00,   // plain sine (SPWM)
    REF_THPWM = 2'b01,   // sine with third harmonic injected (THPWM)
    REF_RSV2  = 2'b10,   // reserved: plain sine
    REF_RSV3  = 2'b11    // reserved: plain sine
  } ref_type_e;

endpackage
