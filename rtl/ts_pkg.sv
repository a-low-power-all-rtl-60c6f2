// ts_pkg: constants shared by the delay-line temperature sensor and its
// self-calibration circuit.
//
// The numbers that come from the published design are the code width of the
// hybrid sensor (M = 9, with N = 5 decoder bits on the long delay line and
// N = 2 on the short one), the eight oscillator resets per sample, and the
// rate of 25 samples per second. Everything else here (clock frequency, gate
// time, fixed-point formats, preset gain and offset) is this implementation's
// own choice and is explained next to each constant.
package ts_pkg;
  timeunit 1ps;
  timeprecision 1ps;

  // ---- sensor ------------------------------------------------------------
  localparam int unsigned CODE_BITS     = 9;   // M: bits of the raw code D(T)
  localparam int unsigned DEC_BITS_LONG = 5;   // N of the long delay line
  localparam int unsigned DEC_BITS_SHORT= 2;   // N of the short delay line
  localparam int unsigned RESETS_PER_SAMPLE = 8;
  // System clock assumed to be 50 MHz (20 ns). 25 samples/s -> 40 ms period.
  localparam int unsigned CLK_PERIOD_PS = 20_000;
  localparam int unsigned SAMPLE_PERIOD_CYCLES = 2_000_000;
  // Oscillator gate time per reset and settling gap between resets (cycles).
  localparam int unsigned RUN_CYCLES_DEFAULT = 8;
  localparam int unsigned GAP_CYCLES_DEFAULT = 4;

  // ---- self-calibration fixed-point formats ------------------------------
  localparam int unsigned CAL_BITS  = 12;  // width of calibrated code C(T)
  localparam int unsigned NC_BITS   = 20;  // correction factor Nc, unsigned
  localparam int unsigned NC_FRAC   = 12;  //   ... with 12 fraction bits
  localparam int unsigned GS_BITS   = 16;  // gain GS, codes per degC, unsigned
  localparam int unsigned GS_FRAC   = 8;   //   ... with 8 fraction bits
  localparam int unsigned OFF_BITS  = 24;  // offset, signed, GS_FRAC fraction bits
  localparam int unsigned REF_BITS  = 12;  // accurate sensor word R(T), signed
  localparam int unsigned GR_SHIFT  = 3;   // GR = 2**3 = 8 codes per degC (0.125 degC)
  localparam int unsigned TEMP_BITS = 16;  // output temperature H, signed, 0.125 degC

  // Preset values loaded at start-up (the "stored values" of the flow).
  // A sensor resolution of 0.36 degC per code at a code of about 450 means a
  // sensitivity of about 0.6 %/degC; with C(Tc) = 2048 at a start-up
  // temperature of 25 degC that gives a preset gain of 12.25 codes/degC and
  // an offset (the code at 0 degC) of 2048 + 25 * 12.25 = 2354.25.
  localparam int unsigned CAL_CODE_DEFAULT = 2048;          // C(Tc)
  localparam int unsigned GS_DEFAULT       = 3136;          // 12.25 codes/degC
  localparam int          OFFSET_DEFAULT   = 602_688;       // 2354.25
  localparam int unsigned DIFF_DEFAULT     = 160;           // 20 degC in R codes

  // Width of the shared sequential divider.
  localparam int unsigned DIV_BITS = 32;
endpackage
