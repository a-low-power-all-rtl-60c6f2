// sense_timing: generates the control waveforms of one temperature sample.
//
// Every PERIOD_CYCLES clock cycles (40 ms at 50 MHz, i.e. 25 samples per
// second) one sample is taken. The sample window starts with a one-cycle clear
// of the coarse counter and the position accumulator, then the oscillator is
// run RUNS times (8 resets per sample, as published): run is high for
// RUN_CYCLES cycles, followed by GAP_CYCLES cycles in which the line settles
// back to its reset state. capture is high in the last cycle of each run, so
// the decoder latches the line on the same edge that drops run. accumulate is
// high in the first gap cycle, when the decoded position is valid. done is a
// one-cycle pulse after the last gap, when the sample's code can be formed.
// sample is high for the whole window (the "Sample" waveform).
//
// After reset the first window starts on the first clock edge; clr is low in
// reset so that the first window's clear is a clean rising edge.
// Outputs are registered, so run and clr, which reach the oscillator and the
// asynchronous counter clear, are free of glitches. The number of resets and
// the sample rate follow the published design; the clock rate, run and gap
// lengths and the order of the strobes are this implementation's own.
module sense_timing #(
  parameter int unsigned RUNS          = ts_pkg::RESETS_PER_SAMPLE,
  parameter int unsigned RUN_CYCLES    = ts_pkg::RUN_CYCLES_DEFAULT,
  parameter int unsigned GAP_CYCLES    = ts_pkg::GAP_CYCLES_DEFAULT,
  parameter int unsigned PERIOD_CYCLES = ts_pkg::SAMPLE_PERIOD_CYCLES
) (
  input  logic clk,
  input  logic rst_n,
  output logic sample,
  output logic run,
  output logic clr,
  output logic capture,
  output logic accumulate,
  output logic done
);
  timeunit 1ps;
  timeprecision 1ps;

  localparam int unsigned WINDOW = 1 + RUNS * (RUN_CYCLES + GAP_CYCLES) + 1;
  localparam int unsigned PW = $clog2(PERIOD_CYCLES + 1);
  localparam int unsigned SW = $clog2(RUN_CYCLES + GAP_CYCLES + 1);
  localparam int unsigned RW = $clog2(RUNS + 1);

  typedef enum logic [2:0] {S_IDLE, S_CLEAR, S_RUN, S_GAP, S_DONE} state_t;

  state_t        state, state_n;
  logic [PW-1:0] per;
  logic [SW-1:0] sub, sub_n;
  logic [RW-1:0] runs, runs_n;
  logic          period_end;

  assign period_end = (per == PW'(PERIOD_CYCLES - 1));

  always_comb begin
    state_n = state;
    sub_n   = sub + 1'b1;
    runs_n  = runs;
    unique case (state)
      S_IDLE:  begin
        sub_n = '0;
        if (period_end) state_n = S_CLEAR;
      end
      S_CLEAR: begin
        state_n = S_RUN;
        sub_n   = '0;
        runs_n  = '0;
      end
      S_RUN:   if (sub == SW'(RUN_CYCLES - 1)) begin
        state_n = S_GAP;
        sub_n   = '0;
      end
      S_GAP:   if (sub == SW'(GAP_CYCLES - 1)) begin
        sub_n  = '0;
        runs_n = runs + 1'b1;
        state_n = (runs == RW'(RUNS - 1)) ? S_DONE : S_RUN;
      end
      S_DONE:  begin
        state_n = S_IDLE;
        sub_n   = '0;
      end
      default: state_n = S_IDLE;
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state      <= S_IDLE;
      per        <= PW'(PERIOD_CYCLES - 1);
      sub        <= '0;
      runs       <= '0;
      sample     <= 1'b0;
      run        <= 1'b0;
      clr        <= 1'b0;
      capture    <= 1'b0;
      accumulate <= 1'b0;
      done       <= 1'b0;
    end else begin
      state      <= state_n;
      per        <= period_end ? '0 : per + 1'b1;
      sub        <= sub_n;
      runs       <= runs_n;
      sample     <= (state_n != S_IDLE);
      run        <= (state_n == S_RUN);
      clr        <= (state_n == S_CLEAR);
      capture    <= (state_n == S_RUN) && (sub_n == SW'(RUN_CYCLES - 1));
      accumulate <= (state_n == S_GAP) && (sub_n == '0);
      done       <= (state_n == S_DONE);
    end
  end

  initial begin
    assert (PERIOD_CYCLES >= WINDOW + 1)
      else $error("sense_timing: PERIOD_CYCLES too short for %0d runs", RUNS);
    assert (RUN_CYCLES >= 1 && GAP_CYCLES >= 1 && RUNS >= 1)
      else $error("sense_timing: run, gap and run count must be at least 1");
  end
endmodule
