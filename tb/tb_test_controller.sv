`timescale 1ps/10fs
// tb_test_controller: runs the measurement flow against stand-ins for the
// PLL, the BIST (passes while the phase count is below a set limit), the
// temperature sensor and the correction. Checks: phase init first, one
// phase step per passing run, t_fastest = t0 - PS * (last passing step),
// the measured delays of the evaluated device (8942.35 ps after 11 passing
// steps, 9326.95 ps when the first fail is at 769.20 ps), a fail at the
// at-speed step 0, the limit N = 49 reached without a fail (t_fastest stays
// at step 48), learn only on step 0, and that done waits for both the
// temperature reading and the correction.
module tb_test_controller;
  import dm_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0, start = 1'b0, learn = 1'b0, busy, done;
  logic ps_req, ps_done = 1'b0;
  ps_op_e ps_op;
  logic bist_start, bist_learn, bist_done = 1'b0, bist_pass = 1'b0;
  logic temp_start, temp_valid = 1'b0, corr_start, corr_valid = 1'b0;
  logic [5:0] step_idx, i_fastest;
  logic step_valid, step_pass, fail_found, limit_reached;
  delay_t t_current, d_measured;
  int checks = 0, failures = 0;

  test_controller dut (.*);

  always #5000 clk = !clk;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s", what);
    end
  endtask

  int phase, inits, steps, runs, learns, temp_delay, first_fail, corr_seen;
  bit temp_started;

  // stand-ins, driven on the falling edge
  int ps_wait, bist_wait, temp_wait, corr_wait;
  always @(negedge clk) begin
    ps_done <= 1'b0; bist_done <= 1'b0; temp_valid <= 1'b0; corr_valid <= 1'b0;
    if (ps_req && !ps_done) begin
      if (ps_wait == 2) begin
        ps_wait <= 0;
        ps_done <= 1'b1;
        if (ps_op == PS_OP_INIT) begin phase <= 0; inits++; end
        else begin phase <= phase + 1; steps++; end
      end else ps_wait <= ps_wait + 1;
    end
    if (bist_wait > 0) begin
      if (bist_wait == 1) begin
        bist_done <= 1'b1;
        bist_pass <= (phase < first_fail);
      end
      bist_wait <= bist_wait - 1;
    end
    if (temp_wait > 0) begin
      if (temp_wait == 1) temp_valid <= 1'b1;
      temp_wait <= temp_wait - 1;
    end
    if (corr_wait > 0) begin
      if (corr_wait == 1) corr_valid <= 1'b1;
      corr_wait <= corr_wait - 1;
    end
  end
  always @(posedge clk) if (rst_n) begin
    if (bist_start) begin
      runs++;
      bist_wait <= 5;
      checks++;
      if (step_idx != 6'(phase)) begin
        failures++;
        $display("FAIL run at step %0d with phase %0d", step_idx, phase);
      end
      if (bist_learn) learns++;
    end
    if (temp_start) begin temp_started = 1; temp_wait <= temp_delay; end
    if (corr_start) begin corr_seen++; corr_wait <= 2; end
  end

  task automatic run(int fail_at, int tdelay, bit lrn);
    phase = 99; inits = 0; steps = 0; runs = 0; learns = 0; corr_seen = 0;
    temp_started = 0;
    first_fail = fail_at; temp_delay = tdelay;
    @(negedge clk);
    start = 1'b1; learn = lrn;
    @(negedge clk);
    start = 1'b0;
    while (!done) @(negedge clk);
    check(inits == 1 && temp_started && corr_seen == 1, "init, temperature and correction once");
  endtask

  initial begin
    #2_000_000_000;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    // reference measurement: steps 0..11 pass, 12 fails
    run(12, 10, 1'b1);
    check(fail_found && !limit_reached, "fail found");
    check(i_fastest == 11 && d_measured == 894235, $sformatf("i_fastest %0d d %0d", i_fastest, d_measured));
    check(runs == 13 && steps == 12, $sformatf("runs %0d steps %0d", runs, steps));
    check(learns == 1, $sformatf("learn runs %0d", learns));
    check(t_current == 1_000_000 - 12 * 9615, "t_current at the failing step");
    // first fail at 8 steps (769.20 ps): fastest passing timing 9326.95 ps
    run(8, 2000, 1'b0);
    check(i_fastest == 7 && d_measured == 932695, $sformatf("d %0d", d_measured));
    check(learns == 0, "no learn");
    // at-speed fail
    run(0, 10, 1'b0);
    check(fail_found && i_fastest == 0 && d_measured == 1_000_000 && runs == 1 && steps == 0,
          "at-speed fail");
    // no fail up to the limit
    run(1000, 10, 1'b0);
    check(limit_reached && !fail_found, "limit reached");
    check(runs == 50 && steps == 49 && i_fastest == 48, $sformatf("limit: runs %0d steps %0d i %0d", runs, steps, i_fastest));
    check(d_measured == 1_000_000 - 48 * 9615, "limit delay");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
