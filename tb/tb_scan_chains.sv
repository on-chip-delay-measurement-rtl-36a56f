`timescale 1ps/10fs
// tb_scan_chains: shifts random data through the 4 x 14 scan chains and
// checks it at the scan outputs and flip-flop outputs, checks the parallel
// load of the functional inputs with se = 0, and the asynchronous reset.
module tb_scan_chains;
  localparam int C = 4, L = 14;
  logic tclk = 1'b0, rst_n = 1'b1, se = 1'b1;
  logic [C-1:0] scan_in = '0, scan_out;
  logic [C*L-1:0] d = '0, q;
  int checks = 0, failures = 0;

  scan_chains #(.NUM_CHAINS(C), .CHAIN_LEN(L)) dut (.*);

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s", what);
    end
  endtask

  task automatic pulse();
    #1000 tclk = 1'b1;
    #1000 tclk = 1'b0;
  endtask

  initial begin
    #100_000_000;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [C-1:0] pat [L];
    logic [C*L-1:0] cap;
    #100 rst_n = 1'b0;
    #400;
    check(q == '0, "reset clears");
    rst_n = 1'b1;
    se = 1'b1;
    for (int j = 0; j < L; j++) begin
      pat[j] = C'($urandom);
      scan_in = pat[j];
      pulse();
    end
    // first shifted value is now at the end of each chain
    for (int c = 0; c < C; c++)
      for (int j = 0; j < L; j++)
        check(q[c*L + j] == pat[L-1-j][c], $sformatf("chain %0d ff %0d", c, j));
    for (int j = 0; j < L; j++) begin
      check(scan_out == pat[j], $sformatf("scan_out %0d", j));
      scan_in = '0;
      pulse();
    end
    se = 1'b0;
    cap = (C*L)'({$urandom, $urandom});
    d = cap;
    pulse();
    check(q == cap, "functional capture with se = 0");
    d = ~cap;
    se = 1'b1;
    pulse();
    check(q[0] == 1'b0 && q[1] == cap[0], "shift after capture");
    rst_n = 1'b0;
    #10;
    check(q == '0, "asynchronous reset");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
