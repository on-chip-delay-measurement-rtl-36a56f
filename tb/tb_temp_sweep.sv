`timescale 1ps/10fs
// tb_temp_sweep: delay measurement over 40..100 degC in 5 degC steps, the
// temperature range of the evaluated device, with the reference taken at
// 70 degC. The user-logic model's critical path is 8900 ps at 70 degC and
// grows 7.3 ps/degC. At every point the measured delay must be the largest
// t_i = 10000 - 96.15*i ps not below the critical path, and the corrected
// delay must equal measured - 7.34 ps/degC * (T - T0). Over the sweep the
// measured delay must not fall as temperature rises, and the spread of the
// corrected delays must be smaller than that of the measured delays.
module tb_temp_sweep;
  import dm_pkg::*;
  localparam int NFF = 56;

  logic clk, dclk, rst_n = 1'b0, func_mode = 1'b0, start = 1'b0, learn = 1'b0;
  logic [15:0] seed = 16'h5EED;
  logic busy, done, ps_req, ps_done, tclk, se, ro_clk;
  ps_op_e ps_op;
  logic [NFF-1:0] cut_q, cut_d;
  alpha_t alpha = 16'd734;
  delay_t d0 = '0;
  temp_t  t0 = '0;
  logic [15:0] cal_count;
  temp_t cal_temp = 16'sd7000;
  logic signed [15:0] cal_slope;
  logic step_valid, step_pass, dec_valid, dec_pass, fail_found, limit_reached;
  logic [5:0] step_idx, i_fastest, dec_pattern;
  delay_t d_measured, t_current;
  logic [15:0] ro_count;
  temp_t t_measured;
  sdelay_t d_corrected, d_aging;
  int phase_steps;
  int temp_cdeg = 7000;
  real extra_ps = 0.0;
  int checks = 0, failures = 0;

  pll_model      u_pll (.clk, .dclk, .ps_req, .ps_op, .ps_done, .phase_steps);
  cut_model      u_cut (.q(cut_q), .d(cut_d), .temp_cdeg, .extra_ps);
  ring_osc_model u_ro  (.temp_cdeg, .ro_clk);

  delay_meas_top dut (.*);

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s", what);
    end
  endtask

  function automatic real ideal_count(real t);
    return 4096.0 * 10000.0 / (5000.0 * (1.0 + 0.0015 * (t - 25.0)));
  endfunction

  task automatic measure(int tc, bit lrn);
    temp_cdeg = tc;
    repeat (5) @(negedge clk);
    start = 1'b1; learn = lrn;
    @(negedge clk);
    start = 1'b0;
    while (!done) @(negedge clk);
  endtask

  initial begin
    #3_000_000_000;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    real slope, crit, sh;
    int ei;
    longint ec;
    longint pre_min = 64'sd1 << 40, pre_max = -(64'sd1 << 40);
    longint post_min = 64'sd1 << 40, post_max = -(64'sd1 << 40);
    delay_t prev = '0;
    cal_count = 16'($rtoi(ideal_count(70.0) + 0.5));
    slope = 6000.0 / (ideal_count(100.0) - ideal_count(40.0));
    cal_slope = 16'($rtoi(slope * 256.0 - 0.5));
    repeat (3) @(negedge clk);
    rst_n = 1'b1;

    measure(7000, 1'b1);
    d0 = d_measured;
    t0 = t_measured;
    check(d0 == 894235, "reference 8942.35 ps");
    $display("reference: T0 = %0d (0.01 degC), D0 = %0d (0.01 ps)", t0, d0);
    $display("  T[degC]  T_sensor  D_measured[ps]  D_corrected[ps]");
    for (int t = 40; t <= 100; t += 5) begin
      measure(t * 100, 1'b0);
      crit = 8900.0 * (1.0 + (7.34 / 8942.35) * (real'(t) - 70.0));
      ei = 0;
      while (ei < 49 && 10000.0 - 96.15 * real'(ei + 1) >= crit) ei++;
      check(fail_found && i_fastest == 6'(ei), $sformatf("%0d degC: step %0d expected %0d", t, i_fastest, ei));
      sh = 734.0 * real'(int'(t_measured) - int'(t0)) / 100.0;
      ec = longint'(d_measured) - longint'($rtoi(sh + ((sh >= 0) ? 0.5 : -0.5)));
      check(longint'(d_corrected) == ec, $sformatf("%0d degC: corrected %0d expected %0d", t, d_corrected, ec));
      check(d_measured >= prev, "measured delay does not fall with temperature");
      prev = d_measured;
      if (longint'(d_measured) < pre_min) pre_min = longint'(d_measured);
      if (longint'(d_measured) > pre_max) pre_max = longint'(d_measured);
      if (longint'(d_corrected) < post_min) post_min = longint'(d_corrected);
      if (longint'(d_corrected) > post_max) post_max = longint'(d_corrected);
      $display("  %7d  %8.2f  %14.2f  %15.2f", t, real'(t_measured) / 100.0,
               real'(d_measured) / 100.0, real'(d_corrected) / 100.0);
    end
    $display("range before correction %0.2f ps, after correction %0.2f ps",
             real'(pre_max - pre_min) / 100.0, real'(post_max - post_min) / 100.0);
    check(post_max - post_min < pre_max - pre_min, "correction narrows the spread");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
