// tb_temp_sensor_chip_full: the chip with every parameter at its default
// (50 MHz clock, one sample every 2,000,000 cycles = 25 samples per second,
// no oscillator noise) taken through one complete calibration: start-up at
// 25 degC, a sample at 52 degC that is past DIFF and fixes gain and offset,
// and a calibrated reading at 75 degC.
//
// Without noise the eight runs of a sample are identical, so each code is
// exactly D = 8 * floor(160 ns / d) (mod 512), with d the modelled cell delay
// d_s(T) = 3000 ps * g_s / (1 - 0.006 * (T - 25)), g = {1.05, 0.94}. The
// sample spacing must be 40 ms, the calibration outputs must match a
// reference model of the formulas bit for bit, and after calibration both
// sensors must read within 4 degC (one code step is about 3 degC here).
module tb_temp_sensor_chip_full;
  timeunit 1ps;
  timeprecision 1ps;
  import ts_pkg::*;

  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  logic [1:0][15:0]   cell_delay_ps;
  logic signed [11:0] r_code = '0;
  logic               r_valid = 0;
  logic [1:0][8:0]    d_code;
  logic [1:0]         d_valid, sample;
  logic [1:0][11:0]   c_code;
  logic [1:0][15:0]   temp;
  logic               out_valid, nc_ready, point1_taken, calibrated;
  logic [15:0]        gain;
  logic signed [23:0] offset;

  temp_sensor_chip dut (
    .clk, .rst_n, .cell_delay_ps, .r_code, .r_valid, .d_code, .d_valid, .sample,
    .c_code, .temp, .out_valid, .nc_ready, .point1_taken, .calibrated, .gain, .offset
  );

  always #(CLK_PERIOD_PS/2) clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  longint cyc = 0;
  always @(posedge clk) cyc++;

  initial begin
    repeat (4 * SAMPLE_PERIOD_CYCLES) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Reference model of the calibration formulas.
  longint m_nc[2], m_c[2], m_h[2];
  longint m_c1, m_r1, m_gs = GS_DEFAULT, m_off = OFFSET_DEFAULT;
  bit     m_p1 = 0, m_cal = 0, m_have_nc = 0;

  function automatic longint clamp(longint v, longint lo, longint hi);
    return (v < lo) ? lo : (v > hi) ? hi : v;
  endfunction

  task automatic model_round(input int d[2], input int r);
    longint g;
    if (!m_have_nc) begin
      foreach (m_nc[i]) m_nc[i] = clamp((longint'(CAL_CODE_DEFAULT) << 12) / d[i], 0, 2**20 - 1);
      m_have_nc = 1;
    end
    foreach (m_c[i]) m_c[i] = clamp((d[i] * m_nc[i]) >> 12, 0, 4095);
    if (!m_p1) begin
      m_c1 = m_c[1];
      m_r1 = r;
      m_p1 = 1;
    end else if (!m_cal && (r - m_r1) > DIFF_DEFAULT && m_c1 > m_c[1]) begin
      g = ((m_c1 - m_c[1]) * 2048) / (r - m_r1);
      if (g != 0 && g < 65536) m_gs = g;
      m_off = m_c1 * 256 + ((m_gs * m_r1) >>> 3);
      m_cal = 1;
    end
    foreach (m_h[i]) m_h[i] = clamp(((m_off - m_c[i] * 256) * 8) / m_gs, -32768, 32767);
  endtask

  real proc[2] = '{1.05, 0.94};
  int  temps[3] = '{25, 52, 75};

  function automatic int delay_at(int s, int t);
    int dl = int'(3000.0 * proc[s] / (1.0 - 0.006 * real'(t - 25)));
    // Keep clear of an edge landing exactly on the capturing clock edge.
    if ((RUN_CYCLES_DEFAULT * CLK_PERIOD_PS) % dl == 0) dl++;
    return dl;
  endfunction

  initial begin
    int d[2];
    longint last_valid = -1;
    cell_delay_ps[0] = 16'(delay_at(0, temps[0]));
    cell_delay_ps[1] = 16'(delay_at(1, temps[0]));
    r_code  = 12'(temps[0] * 8);
    r_valid = 1;
    repeat (3) @(posedge clk);
    @(negedge clk);
    rst_n = 1;
    foreach (temps[k]) begin
      @(posedge clk iff d_valid[1]);
      check(d_valid[0], "both sensors deliver together");
      if (last_valid >= 0)
        check(cyc - last_valid == longint'(SAMPLE_PERIOD_CYCLES),
              $sformatf("sample spacing %0d cycles", cyc - last_valid));
      last_valid = cyc;
      #1;
      foreach (d[i]) begin
        int expect_d;
        expect_d = (8 * ((RUN_CYCLES_DEFAULT * CLK_PERIOD_PS) / delay_at(i, temps[k]))) % 512;
        d[i] = int'(d_code[i]);
        check(d[i] == expect_d, $sformatf("T=%0d sensor %0d code %0d expected %0d",
                                          temps[k], i, d[i], expect_d));
      end
      if (k < 2) begin
        cell_delay_ps[0] = 16'(delay_at(0, temps[k+1]));
        cell_delay_ps[1] = 16'(delay_at(1, temps[k+1]));
      end
      @(posedge clk iff out_valid);
      #1;
      model_round(d, temps[k] * 8);
      if (k < 2) r_code = 12'(temps[k+1] * 8);
      $display("T=%0d D=%0d,%0d H=%0.2f,%0.2f", temps[k], d[0], d[1],
               real'($signed(temp[0])) / 8.0, real'($signed(temp[1])) / 8.0);
      check(calibrated == m_cal && gain == 16'(m_gs) && offset == 24'(m_off),
            $sformatf("T=%0d calibration state", temps[k]));
      for (int i = 0; i < 2; i++) begin
        check(c_code[i] == 12'(m_c[i]) && $signed(temp[i]) == 16'(m_h[i]),
              $sformatf("T=%0d sensor %0d C=%0d/%0d H=%0d/%0d", temps[k], i,
                        c_code[i], m_c[i], $signed(temp[i]), m_h[i]));
        if (m_cal)
          check($signed(temp[i]) - temps[k] * 8 <= 32 && temps[k] * 8 - $signed(temp[i]) <= 32,
                $sformatf("sensor %0d reads %0.2f degC at %0d degC", i,
                          real'($signed(temp[i])) / 8.0, temps[k]));
      end
    end
    check(calibrated, "second calibration point taken");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
