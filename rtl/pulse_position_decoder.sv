// pulse_position_decoder: the "latch and N-bit decoder" of the hybrid sensor.
//
// At the end of each oscillator run the taps of the delay line are latched
// (on the clock edge where capture is 1, which is the edge where the run input
// falls) and the position the travelling edge had reached is encoded into
// N = log2(2*CELLS) bits, the fine LSBs of the sensor code.
//
// Encoding: the line is all ones at the start of a period. In the first half
// period a falling edge moves along it, so the position is the number of
// zeros; the last tap is still 1. In the second half a rising edge moves, the
// last tap is 0 and the position is CELLS plus the number of ones. Counting
// ones and zeros instead of looking for one transition makes the result
// tolerant of a single bubble. Position 0 is the start of a period, where the
// coarse counter has just counted.
//
// Timing: pos is valid one clock after capture. The taps are asynchronous to
// clk; they are sampled once, as a latch would be, without a synchronizer.
// The published design only names the block and its N outputs; the encoding
// above is this implementation's own.
module pulse_position_decoder #(
  parameter int unsigned N = 5
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                capture,
  input  logic [2**(N-1)-1:0] taps,
  output logic [N-1:0]        pos
);
  timeunit 1ps;
  timeprecision 1ps;

  localparam int unsigned CELLS = 2 ** (N - 1);

  logic [CELLS-1:0] latched;
  logic [N-1:0]     ones, pos_d;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)       latched <= '1;
    else if (capture) latched <= taps;
  end

  always_comb begin
    ones = '0;
    for (int i = 0; i < CELLS; i++) ones += N'(latched[i]);
    if (latched[CELLS-1]) pos_d = N'(CELLS) - ones;   // zeros, first half
    else                  pos_d = N'(CELLS) + ones;   // second half
  end

  assign pos = pos_d;
endmodule
