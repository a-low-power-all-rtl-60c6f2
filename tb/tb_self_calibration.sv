// tb_self_calibration: four sensors with different process factors feed the
// calibration circuit through a temperature sweep. A reference model written
// from the calibration formulas (correction factor, normalisation, first
// point, two-point gain and offset, temperature) predicts every normalised
// code, every temperature and the status flags bit for bit. After the
// second point has been taken, every sensor must also read the true
// temperature within 4 degC. A round must not start before every sensor has
// delivered a code, and must finish within its cycle budget.
module tb_self_calibration;
  timeunit 1ps;
  timeprecision 1ps;
  import ts_pkg::*;

  localparam int NS = 4;

  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  logic [NS-1:0][8:0]  d_code = '0;
  logic [NS-1:0]       d_valid = '0;
  logic signed [11:0]  r_code = '0;
  logic                r_valid = 0;
  logic [NS-1:0][11:0] c_code;
  logic [NS-1:0][15:0] temp;
  logic                out_valid, nc_ready, point1_taken, calibrated;
  logic [15:0]         gain;
  logic signed [23:0]  offset;

  self_calibration dut (
    .clk, .rst_n, .d_code, .d_valid, .r_code, .r_valid, .c_code, .temp,
    .out_valid, .nc_ready, .point1_taken, .calibrated, .gain, .offset
  );

  always #10_000 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  initial begin
    repeat (50_000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---- reference model ----------------------------------------------------
  longint m_nc[NS], m_c[NS], m_h[NS];
  longint m_c1, m_r1, m_gs = GS_DEFAULT, m_off = OFFSET_DEFAULT;
  bit     m_p1 = 0, m_cal = 0, m_have_nc = 0;

  function automatic longint clamp(longint v, longint lo, longint hi);
    return (v < lo) ? lo : (v > hi) ? hi : v;
  endfunction

  task automatic model_round(input int d[NS], input int r);
    longint g;
    if (!m_have_nc) begin
      foreach (m_nc[i]) m_nc[i] = clamp((longint'(CAL_CODE_DEFAULT) << 12) / d[i], 0, 2**20 - 1);
      m_have_nc = 1;
    end
    foreach (m_c[i]) m_c[i] = clamp((d[i] * m_nc[i]) >> 12, 0, 4095);
    if (!m_p1) begin
      m_c1 = m_c[0];
      m_r1 = r;
      m_p1 = 1;
    end else if (!m_cal && (r - m_r1) > DIFF_DEFAULT && m_c1 > m_c[0]) begin
      g = ((m_c1 - m_c[0]) * 2048) / (r - m_r1);
      if (g != 0 && g < 65536) m_gs = g;
      m_off = m_c1 * 256 + ((m_gs * m_r1) >>> 3);
      m_cal = 1;
    end
    foreach (m_h[i]) m_h[i] = clamp(((m_off - m_c[i] * 256) * 8) / m_gs, -32768, 32767);
  endtask

  // ---- stimulus -------------------------------------------------------------
  real proc[NS] = '{1.00, 0.93, 1.08, 0.97};
  int  temps[]  = '{25, 25, 30, 40, 50, 60, 70, 20, 45};

  function automatic int code_at(int s, int t);
    return int'(420.0 * proc[s] * (1.0 - 0.006 * real'(t - 25)));
  endfunction

  initial begin
    int d[NS];
    int start_cyc;
    int n_no = 0, n_yes = 0;
    repeat (3) @(posedge clk);
    @(negedge clk);
    rst_n = 1;
    foreach (temps[k]) begin
      foreach (d[i]) d[i] = code_at(i, temps[k]);
      // Sensor 3's code arrives late: nothing may happen before it does.
      @(negedge clk);
      for (int i = 0; i < NS - 1; i++) d_code[i] = 9'(d[i]);
      d_valid = 4'b0111;
      r_code  = 12'(temps[k] * 8);
      r_valid = 1;
      @(negedge clk);
      d_valid = '0;
      r_valid = 0;
      repeat (40) begin
        @(negedge clk);
        if (out_valid) begin
          failures++;
          $display("FAIL: round started before all sensors delivered");
        end
      end
      d_code[3] = 9'(d[3]);
      d_valid   = 4'b1000;
      start_cyc = 0;
      @(negedge clk);
      d_valid = '0;
      while (!out_valid && start_cyc < 1000) begin
        @(negedge clk);
        start_cyc++;
      end
      if (k > 0 && m_p1 && !m_cal && !((temps[k] * 8 - m_r1) > DIFF_DEFAULT)) n_no++;
      model_round(d, temps[k] * 8);
      if (calibrated && k > 0 && m_cal) n_yes++;
      check(start_cyc <= (k == 0 ? 2 * NS + 1 : NS + 2) * (DIV_BITS + 3),
            $sformatf("round %0d took %0d cycles", k, start_cyc));
      check(nc_ready && point1_taken && calibrated == m_cal,
            $sformatf("round %0d status nc=%0b p1=%0b cal=%0b", k, nc_ready, point1_taken, calibrated));
      check(gain == 16'(m_gs) && offset == 24'(m_off),
            $sformatf("round %0d gain %0d/%0d offset %0d/%0d", k, gain, m_gs, offset, m_off));
      for (int i = 0; i < NS; i++) begin
        check(c_code[i] == 12'(m_c[i]),
              $sformatf("round %0d sensor %0d C %0d expected %0d", k, i, c_code[i], m_c[i]));
        check($signed(temp[i]) == 16'(m_h[i]),
              $sformatf("round %0d sensor %0d H %0d expected %0d", k, i, $signed(temp[i]), m_h[i]));
        if (m_cal)
          check($signed(temp[i]) - temps[k] * 8 <= 32 && temps[k] * 8 - $signed(temp[i]) <= 32,
                $sformatf("round %0d sensor %0d reads %0.2f degC at %0d degC",
                          k, i, real'($signed(temp[i])) / 8.0, temps[k]));
      end
    end
    check(n_no >= 2, "rounds below DIFF keep the preset gain");
    check(n_yes >= 1, "second calibration point taken");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
