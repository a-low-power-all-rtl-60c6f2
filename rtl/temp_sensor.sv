// temp_sensor: one all-digital delay-line temperature sensor with the hybrid
// counter / pulse-position decoder readout.
//
// The propagation delay of the delay-line cells grows with temperature, so the
// number of oscillator phases that fit into a fixed gate time falls as the die
// warms up. The code is split in two: a (M-N)-bit counter clocked by the ring
// counts whole oscillation periods (the MSBs) and a decoder reads where in the
// line the edge stood when the ring was stopped (the N LSBs). Because the
// decoder supplies the fine bits, the counter is short and the ring can be
// run briefly, which is where the power saving comes from.
//
// Each sample runs the ring RUNS = 8 times from its reset state (shorter runs
// accumulate less jitter) and adds the eight results: the counter keeps
// counting over all runs and the eight decoded positions are summed, so
//   d_code = count * 2**N + sum(pos)   (wrapping at 2**M)
// With a sum of at most 2**N - 1 this is exactly the concatenation
// {counter, decoder} of the published timing diagram.
//
// Interface: clk/rst_n system clock and reset; cell_delay_ps is the modelled
// delay of one cell (it stands for temperature and process); d_code is valid
// with the one-cycle d_valid pulse at the end of each sample window, and
// sample is high during the window. JITTER_PS only sets the phase noise of
// the oscillator model (see ring_oscillator). The ring has 2**(N-1) cells, so that it
// passes through 2**N states per period.
//
// Two signals deliberately cross between timing styles: the last tap of the
// line clocks the counter and is also sampled by the decoder latch, and clr
// clears the counter asynchronously while also clearing the position sum
// synchronously. Both are sampled only while the ring is stopped.
//
// The split into counter MSBs and decoder LSBs, M, N and the 8 resets follow
// the published design; summing the positions of all eight runs is this
// implementation's reading of how the eight resets are combined.
module temp_sensor #(
  parameter int unsigned M             = ts_pkg::CODE_BITS,
  parameter int unsigned N             = ts_pkg::DEC_BITS_LONG,
  parameter int unsigned RUNS          = ts_pkg::RESETS_PER_SAMPLE,
  parameter int unsigned RUN_CYCLES    = ts_pkg::RUN_CYCLES_DEFAULT,
  parameter int unsigned GAP_CYCLES    = ts_pkg::GAP_CYCLES_DEFAULT,
  parameter int unsigned PERIOD_CYCLES = ts_pkg::SAMPLE_PERIOD_CYCLES,
  parameter int unsigned JITTER_PS     = 0
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic [15:0]  cell_delay_ps,
  output logic         sample,
  output logic [M-1:0] d_code,
  output logic         d_valid
);
  timeunit 1ps;
  timeprecision 1ps;

  localparam int unsigned CELLS = 2 ** (N - 1);
  localparam int unsigned SUMW  = N + $clog2(RUNS + 1);

  logic             run, clr, capture, accumulate, done;
  logic [CELLS-1:0] taps;
  logic             osc;
  logic [N-1:0]     pos;
  logic [M-N-1:0]   count;
  logic [SUMW-1:0]  pos_sum;

  sense_timing #(
    .RUNS(RUNS), .RUN_CYCLES(RUN_CYCLES),
    .GAP_CYCLES(GAP_CYCLES), .PERIOD_CYCLES(PERIOD_CYCLES)
  ) u_timing (
    .clk, .rst_n, .sample, .run, .clr, .capture, .accumulate, .done
  );

  ring_oscillator #(.CELLS(CELLS), .JITTER_PS(JITTER_PS)) u_ring (
    .run, .cell_delay_ps, .taps, .osc
  );

  coarse_counter #(.WIDTH(M - N)) u_counter (
    .osc, .run, .clr, .count
  );

  pulse_position_decoder #(.N(N)) u_decoder (
    .clk, .rst_n, .capture, .taps, .pos
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      pos_sum <= '0;
      d_code  <= '0;
      d_valid <= 1'b0;
    end else begin
      d_valid <= done;
      if (clr)             pos_sum <= '0;
      else if (accumulate) pos_sum <= pos_sum + SUMW'(pos);
      if (done)            d_code  <= M'({count, N'(0)} + (M + SUMW)'(pos_sum));
    end
  end
endmodule
