`timescale 1ps/10fs
// tb_delay_correction: checks the temperature correction against real
// arithmetic, using the reference point (70 degC, 8942.35 ps) and the
// coefficient 7.34 ps/degC of the evaluated device, measured delays from
// 8750.05 ps to 9230.80 ps over 40..100 degC, and random values. Also checks
// the two-cycle latency.
module tb_delay_correction;
  import dm_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0, start = 1'b0, valid;
  delay_t d_measured = '0, d0 = '0;
  temp_t  t_measured = '0, t0 = '0;
  alpha_t alpha = '0;
  sdelay_t d_corrected, d_aging;
  int checks = 0, failures = 0;

  delay_correction dut (.*);

  always #5000 clk = !clk;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s", what);
    end
  endtask

  function automatic longint expected_corr(longint dm, longint tm, longint tref, longint a);
    real shift;
    shift = real'(a) * real'(tm - tref) / 100.0;   // 0.01 ps
    return dm - longint'($rtoi(shift + ((shift >= 0) ? 0.5 : -0.5)));
  endfunction

  task automatic run(longint dm, longint tm, longint dref, longint tref, longint a);
    longint ec;
    int lat;
    @(posedge clk);
    d_measured <= delay_t'(dm); t_measured <= temp_t'(tm);
    d0 <= delay_t'(dref); t0 <= temp_t'(tref); alpha <= alpha_t'(a);
    start <= 1'b1;
    @(posedge clk);
    start <= 1'b0;
    #1;
    lat = 1;
    while (!valid && lat < 10) begin @(posedge clk); #1; lat++; end
    ec = expected_corr(dm, tm, tref, a);
    check(lat == 2, $sformatf("latency %0d", lat));
    check(longint'(d_corrected) == ec, $sformatf("corr %0d exp %0d (dm %0d tm %0d)", d_corrected, ec, dm, tm));
    check(longint'(d_aging) == ec - dref, "aging");
  endtask

  initial begin
    #100_000_000;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(posedge clk);
    rst_n <= 1'b1;
    // reference point reproduces itself
    run(894235, 7000, 894235, 7000, 734);
    check(d_corrected == 894235 && d_aging == 0, "reference point");
    // 9230.80 ps measured at 94.90 degC -> 9048.03 ps
    run(923080, 9490, 894235, 7000, 734);
    check(d_corrected == 904803, $sformatf("hot point %0d", d_corrected));
    // 8750.05 ps measured at 48.49 degC -> 8907.93 ps, aging -34.42 ps
    run(875005, 4849, 894235, 7000, 734);
    check(d_corrected == 890793 && d_aging == -3442, $sformatf("cold point %0d %0d", d_corrected, d_aging));
    for (int n = 0; n < 200; n++)
      run(longint'($urandom_range(1_000_000, 400_000)), longint'($urandom_range(12000, 0)) - 2000,
          longint'($urandom_range(1_000_000, 400_000)), longint'($urandom_range(10000, 0)),
          longint'($urandom_range(2000, 0)));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
