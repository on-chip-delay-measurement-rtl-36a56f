`timescale 1ps/10fs
// tb_test_timing_generator: drives the generator from the PLL model and
// measures the test clock. For phase counts 0..20 and 49 it checks that
// a capture request gives exactly two test-clock edges with SE low, spaced
// by t_i = 10000 ps - 96.15 ps * i; that a burst of shift requests gives one
// test-clock edge per request at the 20 ns scan-clock period with SE high;
// and that the functional mode passes CLK to the test clock with SE low.
module tb_test_timing_generator;
  import dm_pkg::*;
  logic clk, dclk, rst_n = 1'b0, func_mode = 1'b0;
  logic req_valid = 1'b0, req_ready, busy, tclk, se, sclk, shift_active;
  tg_op_e req_op = TG_OP_SHIFT;
  logic ps_req = 1'b0, ps_done;
  ps_op_e ps_op = PS_OP_INIT;
  int phase_steps;
  int checks = 0, failures = 0;

  pll_model u_pll (.clk, .dclk, .ps_req, .ps_op, .ps_done, .phase_steps);
  test_timing_generator dut (.*);

  // record test-clock rising edges
  realtime edge_t [$];
  logic    edge_se [$];
  always @(posedge tclk) begin
    edge_t.push_back($realtime);
    edge_se.push_back(se);
  end

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s", what);
    end
  endtask

  task automatic request(tg_op_e op);
    // drive on the falling edge; ready is stable between rising edges
    @(negedge clk);
    req_valid = 1'b1;
    req_op    = op;
    while (!req_ready) @(negedge clk);
    @(posedge clk);
    #1 req_valid = 1'b0;
  endtask

  task automatic set_phase(int n);
    ps_req <= 1'b1; ps_op <= PS_OP_INIT;
    do @(posedge clk); while (!ps_done);
    for (int k = 0; k < n; k++) begin
      ps_op <= PS_OP_STEP;
      @(posedge clk);
      do @(posedge clk); while (!ps_done);
    end
    ps_req <= 1'b0;
    repeat (4) @(posedge clk);
  endtask

  initial begin
    #50_000_000;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int steps [22];
    realtime gap, expect_gap;
    for (int k = 0; k <= 20; k++) steps[k] = k;
    steps[21] = 49;
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    repeat (3) @(posedge clk);
    foreach (steps[s]) begin
      set_phase(steps[s]);
      check(phase_steps == steps[s], "phase count");
      // scan shift burst
      edge_t.delete(); edge_se.delete();
      repeat (5) request(TG_OP_SHIFT);
      repeat (6) @(posedge clk);
      check(edge_t.size() == 5, $sformatf("shift edges %0d", edge_t.size()));
      for (int k = 0; k < edge_t.size(); k++) begin
        check(edge_se[k] == 1'b1, "se high while shifting");
        if (k > 0) check(edge_t[k] - edge_t[k-1] == 20000.0, "scan clock period");
      end
      // launch / capture pair
      edge_t.delete(); edge_se.delete();
      request(TG_OP_CAPTURE);
      repeat (8) @(posedge clk);
      check(edge_t.size() == 2, $sformatf("capture edges %0d", edge_t.size()));
      if (edge_t.size() == 2) begin
        gap = edge_t[1] - edge_t[0];
        expect_gap = 10000.0 - 96.15 * steps[s];
        check(gap > expect_gap - 0.02 && gap < expect_gap + 0.02,
              $sformatf("phase %0d: test timing %f ps, expected %f", steps[s], gap, expect_gap));
        check(edge_se[0] == 1'b0 && edge_se[1] == 1'b0, "se low at launch and capture");
      end
      check(se == 1'b1 && !busy, "back to shift mode");
    end
    // functional mode
    func_mode <= 1'b1;
    repeat (3) @(posedge clk);
    #1;
    edge_t.delete();
    repeat (10) @(posedge clk);
    #1;
    check(edge_t.size() == 10, $sformatf("functional mode edges %0d", edge_t.size()));
    check(se == 1'b0 && !req_ready, "functional mode: se low, no requests");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
