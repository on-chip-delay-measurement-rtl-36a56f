`timescale 1ps/10fs
// tb_delay_meas_top: end-to-end test of the delay measurement system at its
// default size (4 x 14 scan flip-flops, 32 patterns, up to 49 phase steps of
// 96.15 ps from 10000 ps).
//
// Models: the PLL with dynamic phase shift, the user logic between the scan
// flip-flops with a critical path of 8900 ps at 70 degC rising 7.3 ps/degC,
// and a ring oscillator. Sequence:
//   1. functional mode: the test clock follows CLK, SE = 0;
//   2. reference measurement at 70 degC with learn: expected t_fastest is the
//      largest t_i = 10000 - 96.15*i not below the critical path delay;
//      its result and temperature become (D0, T0);
//   3. measurements at 40 and 100 degC: measured delay as in 2, corrected
//      delay = measured - 7.34 ps/degC * (T - T0) checked exactly and within
//      one phase step plus the sensor error of D0;
//   4. 70 degC with 300 ps of added delay (aging): positive aging result;
//   5. a fast circuit: the sweep ends at the limit N = 49 without a fail;
//   6. a circuit slower than the system clock: fails at step 0.
// Every launch/capture pair on the test clock is timed against the phase
// step in use. The mechanisms exercised are counted and each must occur.
module tb_delay_meas_top;
  import dm_pkg::*;
  localparam int NFF = 56;

  logic clk, dclk, rst_n = 1'b0, func_mode = 1'b0, start = 1'b0, learn = 1'b0;
  logic [15:0] seed = 16'h1D2B;
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

  // ---- mechanism counters -------------------------------------------------
  int n_func_edges, n_learn_runs, n_step_pass, n_step_fail, n_phase_steps;
  int n_dec_pass, n_dec_fail, n_limit, n_atspeed_fail, n_corr_up, n_corr_down;
  int n_capture_pairs, n_timing_errors;

  // ---- launch/capture timing monitor --------------------------------------
  realtime last_low_edge = -1.0;
  int      low_edges = 0;
  always @(posedge tclk) begin
    if (!se && !func_mode) begin
      low_edges++;
      if (low_edges == 2) begin
        realtime gap, exp_gap;
        gap = $realtime - last_low_edge;
        exp_gap = 10000.0 - 96.15 * real'(phase_steps);
        n_capture_pairs++;
        if (gap < exp_gap - 0.02 || gap > exp_gap + 0.02) begin
          n_timing_errors++;
          $display("FAIL test timing %f expected %f", gap, exp_gap);
        end
      end
      last_low_edge = $realtime;
    end
  end
  always @(posedge se) low_edges = 0;

  // per-run logs
  int dec_fail_seen, dec_after_fail_pass;
  always @(posedge clk) if (rst_n) begin
    if (step_valid) begin
      if (step_pass) n_step_pass++; else n_step_fail++;
      dec_fail_seen = 0;
    end
    if (dec_valid) begin
      if (dec_pass) n_dec_pass++; else n_dec_fail++;
      if (!dec_pass) dec_fail_seen = 1;
      else if (dec_fail_seen) dec_after_fail_pass++;
    end
    if (dut.u_ctrl.bist_start && dut.u_ctrl.bist_learn) n_learn_runs++;
    if (ps_req && ps_done && ps_op == PS_OP_STEP) n_phase_steps++;
  end

  // expected last passing step for a critical path delay
  function automatic int exp_fastest(real crit);
    int i = 0;
    while (i < 49 && 10000.0 - 96.15 * real'(i + 1) >= crit) i++;
    // a pass at the limit N = 49 leaves t_fastest at step 48
    return (i == 49) ? 48 : i;
  endfunction

  function automatic real crit_delay(int tc, real extra);
    return 8900.0 * (1.0 + (7.34 / 8942.35) * (real'(tc) / 100.0 - 70.0)) + extra;
  endfunction

  function automatic real ideal_count(real t);
    return 4096.0 * 10000.0 / (5000.0 * (1.0 + 0.0015 * (t - 25.0)));
  endfunction

  task automatic measure(int tc, real extra, bit lrn);
    temp_cdeg = tc;
    extra_ps  = extra;
    repeat (5) @(negedge clk);
    start = 1'b1; learn = lrn;
    @(negedge clk);
    start = 1'b0;
    while (!done) @(negedge clk);
    $display("T=%0d.%02d degC extra=%0.0f ps: i_fastest=%0d D=%0d T_meas=%0d Dcorr=%0d Daging=%0d fail=%0d limit=%0d",
             tc / 100, tc % 100, extra, i_fastest, d_measured, t_measured, d_corrected, d_aging,
             fail_found, limit_reached);
  endtask

  task automatic check_measurement(int tc, real extra);
    int ei;
    longint ec;
    real sh;
    ei = exp_fastest(crit_delay(tc, extra));
    check(i_fastest == 6'(ei), $sformatf("i_fastest %0d expected %0d", i_fastest, ei));
    check(d_measured == delay_t'(1_000_000 - 9615 * ei), "measured delay = t0 - PS*i");
    check(t_measured > temp_t'(tc - 150) && t_measured < temp_t'(tc + 150),
          $sformatf("sensor %0d at %0d", t_measured, tc));
    sh = 734.0 * real'(int'(t_measured) - int'(t0)) / 100.0;
    ec = longint'(d_measured) - longint'($rtoi(sh + ((sh >= 0) ? 0.5 : -0.5)));
    check(longint'(d_corrected) == ec, $sformatf("corrected %0d expected %0d", d_corrected, ec));
    check(longint'(d_aging) == ec - longint'(d0), "aging = corrected - D0");
    check(dec_after_fail_pass == 0, "no pass after a failing pattern within a run");
  endtask

  initial begin
    #3_000_000_000;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    real slope;
    cal_count = 16'($rtoi(ideal_count(70.0) + 0.5));
    slope = 6000.0 / (ideal_count(100.0) - ideal_count(40.0));
    cal_slope = 16'($rtoi(slope * 256.0 - 0.5));

    repeat (3) @(negedge clk);
    rst_n = 1'b1;

    // 1. functional mode
    func_mode = 1'b1;
    repeat (3) @(negedge clk);
    begin
      int e0;
      e0 = 0;
      fork
        begin repeat (20) @(posedge tclk) e0++; end
        begin repeat (21) @(posedge clk); end
      join_any
      disable fork;
      n_func_edges = e0;
      check(e0 == 20 && se == 1'b0, $sformatf("functional mode edges %0d", e0));
    end
    func_mode = 1'b0;
    repeat (3) @(negedge clk);

    // 2. reference measurement
    measure(7000, 0.0, 1'b1);
    check(fail_found && i_fastest == 11 && d_measured == 894235,
          "reference delay 8942.35 ps at 70 degC");
    check_measurement(7000, 0.0);   // against the NVM values still at 0
    d0 = d_measured;
    t0 = t_measured;

    // 3. temperature corners
    measure(4000, 0.0, 1'b0);
    check_measurement(4000, 0.0);
    check(d_measured == 875005, "8750.05 ps at 40 degC");
    if (d_corrected > d_measured) n_corr_up++;
    check(d_corrected > sdelay_t'(d0) - 9615 - 2000 && d_corrected < sdelay_t'(d0) + 9615 + 2000,
          "corrected delay near D0");
    measure(10000, 0.0, 1'b0);
    check_measurement(10000, 0.0);
    if (d_corrected < d_measured) n_corr_down++;
    check(d_corrected > sdelay_t'(d0) - 9615 - 2000 && d_corrected < sdelay_t'(d0) + 9615 + 2000,
          "corrected delay near D0");

    // 4. aging
    measure(7000, 300.0, 1'b0);
    check_measurement(7000, 300.0);
    check(d_aging > 20000, $sformatf("aging detected %0d", d_aging));

    // 5. fast circuit: limit
    measure(7000, -4000.0, 1'b0);
    check_measurement(7000, -4000.0);
    if (limit_reached && !fail_found) n_limit++;
    check(limit_reached && i_fastest == 48, "limit N reached");

    // 6. slow circuit: at-speed fail
    measure(7000, 1500.0, 1'b0);
    if (fail_found && step_idx == 0) n_atspeed_fail++;
    check(fail_found && i_fastest == 0 && step_idx == 0, "at-speed fail at step 0");

    check(n_timing_errors == 0, "test timing of every launch/capture pair");
    $display("mechanisms: func_edges=%0d learn_runs=%0d step_pass=%0d step_fail=%0d phase_steps=%0d dec_pass=%0d dec_fail=%0d limit=%0d atspeed_fail=%0d corr_up=%0d corr_down=%0d capture_pairs=%0d",
             n_func_edges, n_learn_runs, n_step_pass, n_step_fail, n_phase_steps, n_dec_pass,
             n_dec_fail, n_limit, n_atspeed_fail, n_corr_up, n_corr_down, n_capture_pairs);
    check(n_func_edges > 0, "functional mode happened");
    check(n_learn_runs == 1, "one learn run");
    check(n_step_pass > 0 && n_step_fail > 0, "passing and failing steps");
    check(n_phase_steps > 0, "phase steps");
    check(n_dec_pass > 0 && n_dec_fail > 0, "passing and failing patterns");
    check(n_limit > 0, "limit reached");
    check(n_atspeed_fail > 0, "at-speed fail");
    check(n_corr_up > 0 && n_corr_down > 0, "correction in both directions");
    check(n_capture_pairs > 0, "launch/capture pairs");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
