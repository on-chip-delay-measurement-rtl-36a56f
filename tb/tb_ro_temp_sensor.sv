`timescale 1ps/10fs
// tb_ro_temp_sensor: the sensor reads a ring-oscillator model at 40 to
// 100 degC. The calibration (count at 70 degC and slope between 40 and
// 100 degC) is computed here from the oscillator formula. Checks the raw
// count against the window length over the oscillator period (+-2 counts),
// the temperature arithmetic exactly, the result within 1.5 degC of the true
// temperature, and the start-to-valid latency.
module tb_ro_temp_sensor;
  import dm_pkg::*;
  localparam int GATE = 4096;
  logic clk = 1'b0, rst_n = 1'b0, start = 1'b0, busy, valid, ro_clk;
  logic [15:0] cal_count, count;
  temp_t cal_temp, temperature;
  logic signed [15:0] cal_slope;
  int temp_cdeg = 7000;
  int checks = 0, failures = 0;

  ring_osc_model u_ro (.temp_cdeg, .ro_clk);
  ro_temp_sensor #(.GATE_CYCLES(GATE)) dut (.*);

  always #5000 clk = !clk;

  function automatic real ideal_count(real t);
    return real'(GATE) * 10000.0 / (5000.0 * (1.0 + 0.0015 * (t - 25.0)));
  endfunction

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s", what);
    end
  endtask

  initial begin
    #2_000_000_000;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    real slope;
    int lat, exp_t;
    cal_count = 16'($rtoi(ideal_count(70.0) + 0.5));
    cal_temp  = 7000;
    slope = 6000.0 / (ideal_count(100.0) - ideal_count(40.0));   // 0.01 degC per count
    cal_slope = 16'($rtoi(slope * 256.0 - 0.5));
    repeat (2) @(posedge clk);
    rst_n <= 1'b1;
    for (int t = 40; t <= 100; t += 10) begin
      temp_cdeg = t * 100;
      @(posedge clk);
      start <= 1'b1;
      @(posedge clk);
      start <= 1'b0;
      #1;
      lat = 1;
      while (!valid && lat < GATE + 100) begin @(posedge clk); #1; lat++; end
      check(lat == GATE + 8 + 2, $sformatf("latency %0d", lat));
      check(real'(count) > ideal_count(real'(t)) - 2.0 && real'(count) < ideal_count(real'(t)) + 2.0,
            $sformatf("count %0d ideal %f", count, ideal_count(real'(t))));
      exp_t = 7000 + ((int'(count) - int'(cal_count)) * int'(cal_slope) >>> 8);
      check(int'(temperature) == exp_t, $sformatf("arith %0d exp %0d", temperature, exp_t));
      check(temperature > temp_t'(t * 100 - 150) && temperature < temp_t'(t * 100 + 150),
            $sformatf("temperature %0d at %0d degC", temperature, t));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
