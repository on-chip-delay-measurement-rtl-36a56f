`timescale 1ps/10fs
// cut_model: behavioural model of the combinational user logic between the
// scan flip-flops, with path delays, for simulation only.
//
// Next-state bit k is q[k] ^ q[k+1] ^ (q[k+5] & q[k+11]) (indices modulo
// NFF). Each output changes a transport delay after its inputs; the delay
// of bit k is
//   CRIT_PS * REL[k] * (1 + TC * (T - 70 degC)) + extra_ps,
// where bit 0 carries the critical path (REL = 1) and a few bits are close
// to it; a delay is never below 10 ps. T (temp_cdeg, 0.01 degC) and extra_ps (aging or a speed corner)
// are inputs, so a testbench can move the circuit delay.
module cut_model #(
  parameter int  NFF     = 56,
  parameter real CRIT_PS = 8900.0,
  parameter real TC      = 7.34 / 8942.35
) (
  input  logic [NFF-1:0] q,
  output logic [NFF-1:0] d,
  input  int             temp_cdeg,
  input  real            extra_ps
);

  function automatic real rel(int k);
    case (k)
      0: return 1.0;
      1: return 0.97;
      2: return 0.93;
      3: return 0.90;
      default: return 0.3 + 0.01 * real'(k % 40);
    endcase
  endfunction

  for (genvar k = 0; k < NFF; k++) begin : g_bit
    logic    nf;
    logic    dbit = 1'b0;
    realtime dly;
    assign nf  = q[k] ^ q[(k + 1) % NFF] ^ (q[(k + 5) % NFF] & q[(k + 11) % NFF]);
    realtime raw;
    assign raw = CRIT_PS * rel(k) * (1.0 + TC * (real'(temp_cdeg) / 100.0 - 70.0)) + extra_ps;
    assign dly = (raw < 10.0) ? 10.0 : raw;
    always @(nf) dbit <= #(dly) nf;
    assign d[k] = dbit;
  end

endmodule
