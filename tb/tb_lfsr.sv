`timescale 1ps/10fs
// tb_lfsr: checks the pattern generator against an independent model of the
// x^16 + x^14 + x^13 + x^11 + 1 Fibonacci LFSR: seed load, zero-seed
// replacement, hold without adv, scan-input taps, and the full period of
// 65535 steps.
module tb_lfsr;
  logic clk = 1'b0;
  logic load = 1'b0, adv = 1'b0;
  logic [15:0] seed = '0, state;
  logic [3:0]  scan_in;
  int checks = 0, failures = 0;

  lfsr dut (.clk, .load, .seed, .adv, .state, .scan_in);

  always #5000 clk = !clk;

  function automatic logic [15:0] ref_next(logic [15:0] s);
    return {s[14:0], s[15] ^ s[13] ^ s[12] ^ s[10]};
  endfunction

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s", what);
    end
  endtask

  initial begin
    #200_000_000_000;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [15:0] exp;
    int period;
    @(posedge clk);
    seed = 16'hACE1; load = 1'b1;
    @(posedge clk); load = 1'b0;
    check(state == 16'hACE1, "seed load");
    exp = 16'hACE1;
    adv = 1'b1;
    for (int n = 0; n < 200; n++) begin
      @(posedge clk);
      exp = ref_next(exp);
      check(state == exp, $sformatf("step %0d state %h exp %h", n, state, exp));
      check(scan_in == {exp[12], exp[8], exp[4], exp[0]}, "scan_in taps");
    end
    adv = 1'b0;
    repeat (3) @(posedge clk);
    check(state == exp, "hold without adv");
    seed = 16'h0000; load = 1'b1;
    @(posedge clk); load = 1'b0;
    check(state == 16'h0001, "zero seed replaced by 1");
    adv = 1'b1;
    period = 0;
    do begin
      @(posedge clk);
      period++;
    end while (state != 16'h0001 && period < 70000);
    adv = 1'b0;
    check(period == 65535, $sformatf("period %0d", period));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
