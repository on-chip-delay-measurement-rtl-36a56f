`timescale 1ps/10fs
// tb_misr: checks the signature register against an independent model,
// checks clear and hold, and checks that a single flipped input bit in a
// long stream gives a different signature.
module tb_misr;
  logic clk = 1'b0;
  logic clear = 1'b0, en = 1'b0;
  logic [3:0]  data = '0;
  logic [15:0] signature;
  int checks = 0, failures = 0;

  misr dut (.clk, .clear, .en, .data, .signature);

  always #5000 clk = !clk;

  function automatic logic [15:0] ref_step(logic [15:0] s, logic [3:0] d);
    logic [15:0] n;
    n = {s[14:0], s[15] ^ s[13] ^ s[12] ^ s[10]};
    n[3:0] = n[3:0] ^ d;
    return n;
  endfunction

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s", what);
    end
  endtask

  initial begin
    #100_000_000;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [15:0] exp, sig_a;
    logic [3:0] stream [300];
    for (int n = 0; n < 300; n++) stream[n] = 4'($urandom);
    for (int pass_no = 0; pass_no < 2; pass_no++) begin
      @(posedge clk); clear = 1'b1;
      @(posedge clk); clear = 1'b0;
      check(signature == '0, "clear");
      exp = '0;
      en = 1'b1;
      for (int n = 0; n < 300; n++) begin
        data = stream[n];
        if (pass_no == 1 && n == 123) data[2] = !data[2];
        @(posedge clk);
        exp = ref_step(exp, data);
        check(signature == exp, $sformatf("step %0d", n));
      end
      en = 1'b0;
      data = 4'hF;
      repeat (2) @(posedge clk);
      check(signature == exp, "hold");
      if (pass_no == 0) sig_a = signature;
      else check(signature != sig_a, "single-bit error changes signature");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
