// tb_sense_timing: runs three sample periods of a shortened schedule
// (run 3 cycles, gap 2, period 60) and checks, per period: one clear at the
// start, exactly 8 runs of 3 cycles, a capture in the last cycle of every run,
// an accumulate strobe in the first cycle after every run, one done pulse
// after the last run, sample high over the whole window, and a period of
// exactly 60 cycles between done pulses.
module tb_sense_timing;
  timeunit 1ps;
  timeprecision 1ps;

  localparam int RUNS = 8, RUNC = 3, GAPC = 2, PERIOD = 60;
  localparam int WINDOW = 1 + RUNS * (RUNC + GAPC) + 1;

  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  logic sample, run, clr, capture, accumulate, done;
  int cyc = 0;

  sense_timing #(.RUNS(RUNS), .RUN_CYCLES(RUNC), .GAP_CYCLES(GAPC), .PERIOD_CYCLES(PERIOD))
    dut (.clk, .rst_n, .sample, .run, .clr, .capture, .accumulate, .done);

  always #10_000 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Per-period counters, sampled after each rising edge.
  int n_clr, n_runs, n_runhi, n_cap, n_acc, n_done, last_done, periods;
  int n_bad_cap, n_bad_acc, n_samp_lo;
  logic run_d, cap_d;

  initial begin
    n_clr = 0; n_runs = 0; n_runhi = 0; n_cap = 0; n_acc = 0; n_done = 0;
    n_bad_cap = 0; n_bad_acc = 0; n_samp_lo = 0;
    last_done = -1; periods = 0; run_d = 0; cap_d = 0;
    repeat (3) @(posedge clk);
    @(negedge clk);
    rst_n = 1;
    forever begin
      @(posedge clk);
      #1;
      cyc++;
      if (clr) n_clr++;
      if (run && !run_d) n_runs++;
      if (run) n_runhi++;
      if (capture) n_cap++;
      if (accumulate) n_acc++;
      // capture must be in the last run cycle: the cycle after it, run is low.
      if (cap_d && run) n_bad_cap++;
      if (capture && !run) n_bad_cap++;
      // accumulate must come right after a capture.
      if (accumulate && !cap_d) n_bad_acc++;
      if ((run || capture || accumulate) && !sample) n_samp_lo++;
      run_d = run;
      cap_d = capture;
      if (done) begin
        periods++;
        check(n_clr == 1, $sformatf("one clear per sample, got %0d", n_clr));
        check(n_runs == RUNS, $sformatf("runs per sample %0d", n_runs));
        check(n_runhi == RUNS * RUNC, $sformatf("run cycles %0d", n_runhi));
        check(n_cap == RUNS && n_bad_cap == 0, "capture in last cycle of each run");
        check(n_acc == RUNS && n_bad_acc == 0, "accumulate after each capture");
        check(n_samp_lo == 0, "sample covers the window");
        if (last_done >= 0) check(cyc - last_done == PERIOD, $sformatf("period %0d", cyc - last_done));
        last_done = cyc;
        n_clr = 0; n_runs = 0; n_runhi = 0; n_cap = 0; n_acc = 0;
        n_bad_cap = 0; n_bad_acc = 0; n_samp_lo = 0;
        if (periods == 3) begin
          $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
          $finish;
        end
      end else if (last_done >= 0 && cyc - last_done > 1 && cyc - last_done < PERIOD - WINDOW - 1) begin
        // Between windows the oscillator must be idle.
        if (run || sample) begin
          failures++;
          $display("FAIL: activity outside the sample window at cycle %0d", cyc);
        end
      end
    end
  end
endmodule
