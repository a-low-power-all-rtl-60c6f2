// ring_oscillator: behavioural model (not synthesizable logic) of the gated
// delay-line ring oscillator that senses temperature.
//
// CELLS delay cells form a loop closed through one inverting gate that also
// takes the Reset/run input. While run is 0 the gate output is forced to 1 and
// every cell settles to 1. When run rises an edge enters the line, travels
// through all cells, comes back inverted and travels again, so one oscillation
// period is 2*CELLS cell delays and the line passes through 2*CELLS distinct
// states per period. The cell delay stands for the temperature- and
// process-dependent propagation delay of a real cell (on an FPGA, a chain of
// LUTs kept from optimisation); the environment supplies it in picoseconds on
// cell_delay_ps. The gate itself is modelled with no delay, so the period is
// exactly 2*CELLS*cell_delay_ps.
//
// JITTER_PS adds to every cell transition an independent random delay,
// uniform in [-JITTER_PS, +JITTER_PS], standing for the oscillator's phase
// noise; with the default 0 the model is exact and repeatable. It must stay
// below cell_delay_ps.
//
// Ports: run (the "Reset" input of the delay line: 1 = oscillate),
// cell_delay_ps, taps (output of every cell, taps[CELLS-1] is the last one),
// osc (the oscillation output that clocks the coarse counter).
// The loop of cells and a gating input follow the published architecture;
// non-inverting cells and a single inversion in the gate are this model's
// choice.
module ring_oscillator #(
  parameter int unsigned CELLS     = 16,
  parameter int unsigned JITTER_PS = 0
) (
  input  logic             run,
  input  logic [15:0]      cell_delay_ps,
  output logic [CELLS-1:0] taps,
  output logic             osc
);
  timeunit 1ps;
  timeprecision 1ps;

  logic gate_out;

  // Inverting gate with the run input: 1 while stopped.
  assign gate_out = ~(run & taps[CELLS-1]);
  assign osc      = taps[CELLS-1];

  function automatic int unsigned cell_delay();
    if (JITTER_PS == 0) return int'(cell_delay_ps);
    return int'(cell_delay_ps) + $urandom_range(2 * JITTER_PS) - JITTER_PS;
  endfunction

  initial taps = '1;

  always @(gate_out) taps[0] <= #(cell_delay()) gate_out;

  for (genvar i = 1; i < CELLS; i++) begin : g_cell
    always @(taps[i-1]) taps[i] <= #(cell_delay()) taps[i-1];
  end
endmodule
