// coarse_counter: the (M-N)-bit counter of the hybrid sensor.
//
// It is clocked by the ring oscillator output and counts its rising edges,
// one per oscillation period, while the run input is high. It is cleared
// asynchronously by clr at the start of each sample and is not cleared
// between the eight runs of a sample, so at the end of the sample it holds the
// number of whole periods of all runs together: the M-N MSBs of the sensor
// code. It wraps at 2**(M-N).
//
// Timing: the count is read in the system clock domain only while the
// oscillator is stopped, so it is stable when read. Rising edges that the
// line produces while it settles after run falls are not counted.
// The counter and its width follow the published architecture; the clear and
// enable scheme is this implementation's own.
module coarse_counter #(
  parameter int unsigned WIDTH = 4
) (
  input  logic             osc,
  input  logic             run,
  input  logic             clr,
  output logic [WIDTH-1:0] count
);
  timeunit 1ps;
  timeprecision 1ps;

  always_ff @(posedge osc or posedge clr) begin
    if (clr)      count <= '0;
    else if (run) count <= count + 1'b1;
  end
endmodule
