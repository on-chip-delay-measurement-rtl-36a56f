`timescale 1ps/10fs
// tb_bist_sequencer: runs the sequencer against a test-timing-generator
// stand-in that stalls at random and a signature that depends on the number
// of shifts so far. Checks per run: one LFSR load / MISR clear at the start,
// CHAIN_LEN shifts before every capture, NUM_PATTERNS captures, MISR
// compaction off for pattern 1 only, decisions for patterns 2..NUM_PATTERNS
// in order. A learn run and a compare run with the same signatures pass; a
// run whose signature is corrupted from pattern K on fails pattern K and
// every later one.
module tb_bist_sequencer;
  import dm_pkg::*;
  localparam int P = 32, L = 14;
  logic clk = 1'b0, rst_n = 1'b0, start = 1'b0, learn = 1'b0;
  logic busy, done, pass;
  logic tg_valid, tg_ready = 1'b0, tg_busy = 1'b0;
  tg_op_e tg_op;
  logic lfsr_load, misr_clear, misr_en;
  logic [15:0] signature = '0;
  logic dec_valid, dec_pass;
  logic [5:0] dec_pattern;
  int checks = 0, failures = 0;

  bist_sequencer #(.NUM_PATTERNS(P), .CHAIN_LEN(L)) dut (.*);

  always #5000 clk = !clk;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s", what);
    end
  endtask

  // generator stand-in and monitors
  int shifts, shifts_since_cap, captures, loads, clears, decs, busy_cnt;
  int corrupt_from;   // pattern from which the signature is wrong (0: never)
  int fail_pats [$];
  int pass_pats [$];

  always @(negedge clk) begin
    tg_ready <= ($urandom_range(3, 0) != 0);
    if (busy_cnt > 0) busy_cnt <= busy_cnt - 1;
    tg_busy <= (busy_cnt > 0);
    signature <= 16'(shifts * 40503 + 7) ^
                 ((corrupt_from != 0 && shifts > (corrupt_from - 1) * L) ? 16'h0100 : 16'h0);
  end

  always @(posedge clk) if (rst_n) begin
    if (lfsr_load) loads++;
    if (misr_clear) clears++;
    if (tg_valid && tg_ready && tg_op == TG_OP_SHIFT) begin
      shifts++;
      shifts_since_cap++;
      checks++;
      if (misr_en != (captures != 0)) begin
        failures++;
        $display("FAIL misr_en %0d during pattern %0d", misr_en, captures + 1);
      end
    end
    if (tg_valid && tg_ready && tg_op == TG_OP_CAPTURE) begin
      checks++;
      if (shifts_since_cap != L) begin
        failures++;
        $display("FAIL %0d shifts before capture", shifts_since_cap);
      end
      shifts_since_cap = 0;
      captures++;
      busy_cnt = 3;
    end
    if (dec_valid) begin
      decs++;
      checks++;
      if (int'(dec_pattern) != decs + 1) begin
        failures++;
        $display("FAIL decision order %0d (expected %0d) at %t", dec_pattern, decs + 1, $realtime);
      end
      if (dec_pass) pass_pats.push_back(int'(dec_pattern));
      else fail_pats.push_back(int'(dec_pattern));
    end
  end

  task automatic run(bit lrn, int corrupt);
    shifts = 0; shifts_since_cap = 0; captures = 0; loads = 0; clears = 0; decs = 0;
    corrupt_from = corrupt;
    fail_pats.delete(); pass_pats.delete();
    @(negedge clk);
    start = 1'b1; learn = lrn;
    @(negedge clk);
    start = 1'b0;
    check(busy, "busy after start");
    while (!done) @(negedge clk);
    check(loads == 1 && clears == 1, $sformatf("load/clear %0d %0d", loads, clears));
    check(captures == P, $sformatf("captures %0d", captures));
    check(shifts == P * L, $sformatf("shifts %0d", shifts));
    check(decs == P - 1, $sformatf("decisions %0d", decs));
    @(negedge clk);
    check(!busy, "idle after done");
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
    run(1'b1, 0);
    check(pass && fail_pats.size() == 0, "learn run passes");
    run(1'b0, 0);
    check(pass && fail_pats.size() == 0, "compare run with same signatures passes");
    run(1'b0, 9);
    check(!pass, "corrupted run fails");
    check(pass_pats.size() == 7 && fail_pats.size() == P - 8,
          $sformatf("pass %0d fail %0d", pass_pats.size(), fail_pats.size()));
    check(fail_pats.size() > 0 && fail_pats[0] == 9, "first failing pattern is 9");
    run(1'b0, 0);
    check(pass, "golden table unchanged by compare runs");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
