// temp_sensor_chip: the proposed on-chip thermal monitor, two hybrid
// delay-line sensors sharing one continuous self-calibration circuit.
//
// Sensor 0 has the short delay line with a 2-bit decoder (N = 2, 2 cells) and
// sensor 1 the long delay line with a 5-bit decoder (N = 5, 16 cells); both
// deliver M = 9-bit codes. The codes go to self_calibration, which removes each
// sensor's process spread at start-up and then converts the codes to
// temperatures, using the long sensor, placed next to the off-chip accurate
// sensor, for the two-point gain and offset calibration. The accurate sensor
// is outside the chip; its reading enters as r_code/r_valid (signed, 0.125
// degC per code).
//
// Ports: clk/rst_n; cell_delay_ps per sensor, the modelled delay of one delay
// cell at that sensor's temperature and process corner (it replaces the
// physical temperature in simulation); raw codes d_code with d_valid; the
// normalised codes c_code and temperatures temp (signed, 0.125 degC) with
// out_valid; the calibration status and the gain and offset in use.
// JITTER_PS sets the phase noise of the oscillator models (0: none).
// Timing: one sample per PERIOD_CYCLES clocks (40 ms at the assumed 50 MHz,
// 25 samples per second); out_valid follows each sample after the shared
// divider has run (about 3 * 35 cycles).
//
// The pairing of sensors and calibration circuit follows the published chip
// layout; that it carries only the two proposed sensors (not the counter-only
// reference designs also placed there for comparison) and that the long one is
// the calibration sensor are this implementation's choices.
module temp_sensor_chip
  import ts_pkg::*;
#(
  parameter int unsigned RUN_CYCLES    = ts_pkg::RUN_CYCLES_DEFAULT,
  parameter int unsigned GAP_CYCLES    = ts_pkg::GAP_CYCLES_DEFAULT,
  parameter int unsigned PERIOD_CYCLES = SAMPLE_PERIOD_CYCLES,
  parameter int unsigned DIFF          = DIFF_DEFAULT,
  parameter int unsigned JITTER_PS     = 0
) (
  input  logic                            clk,
  input  logic                            rst_n,
  input  logic [1:0][15:0]                cell_delay_ps,
  input  logic signed [REF_BITS-1:0]      r_code,
  input  logic                            r_valid,
  output logic [1:0][CODE_BITS-1:0]       d_code,
  output logic [1:0]                      d_valid,
  output logic [1:0]                      sample,
  output logic [1:0][CAL_BITS-1:0]        c_code,
  output logic [1:0][TEMP_BITS-1:0]       temp,
  output logic                            out_valid,
  output logic                            nc_ready,
  output logic                            point1_taken,
  output logic                            calibrated,
  output logic [GS_BITS-1:0]              gain,
  output logic signed [OFF_BITS-1:0]      offset
);
  timeunit 1ps;
  timeprecision 1ps;

  temp_sensor #(
    .M(CODE_BITS), .N(DEC_BITS_SHORT), .RUNS(RESETS_PER_SAMPLE),
    .RUN_CYCLES(RUN_CYCLES), .GAP_CYCLES(GAP_CYCLES), .PERIOD_CYCLES(PERIOD_CYCLES),
    .JITTER_PS(JITTER_PS)
  ) u_ts_short (
    .clk, .rst_n, .cell_delay_ps(cell_delay_ps[0]), .sample(sample[0]),
    .d_code(d_code[0]), .d_valid(d_valid[0])
  );

  temp_sensor #(
    .M(CODE_BITS), .N(DEC_BITS_LONG), .RUNS(RESETS_PER_SAMPLE),
    .RUN_CYCLES(RUN_CYCLES), .GAP_CYCLES(GAP_CYCLES), .PERIOD_CYCLES(PERIOD_CYCLES),
    .JITTER_PS(JITTER_PS)
  ) u_ts_long (
    .clk, .rst_n, .cell_delay_ps(cell_delay_ps[1]), .sample(sample[1]),
    .d_code(d_code[1]), .d_valid(d_valid[1])
  );

  self_calibration #(
    .NUM_SENSORS(2), .REF_SENSOR(1), .DW(CODE_BITS), .DIFF(DIFF)
  ) u_cal (
    .clk, .rst_n, .d_code, .d_valid, .r_code, .r_valid,
    .c_code, .temp, .out_valid, .nc_ready, .point1_taken, .calibrated,
    .gain, .offset
  );
endmodule
