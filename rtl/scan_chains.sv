`timescale 1ps/10fs
// scan_chains: the scan flip-flops of the circuit under test.
//
// NUM_CHAINS chains of CHAIN_LEN mux-D scan flip-flops, all clocked by the
// test clock tclk. With se = 1 every chain shifts by one position per clock
// (scan_in enters flip-flop 0, scan_out is the last flip-flop); with se = 0
// every flip-flop loads its functional input d from the user logic, which is
// how the launch and capture clocks of a launch-off-capture test act. The
// flip-flop outputs q go to the user logic. Flip-flop (c, j) is bit
// c*CHAIN_LEN + j of d and q. Scan chains in the user logic follow the
// measurement method; the sizes (4 chains of 14, enough for the 53 flip-flops
// of the ITC'99 b13 benchmark) and the asynchronous reset are this design's.
module scan_chains #(
  parameter int unsigned NUM_CHAINS = 4,
  parameter int unsigned CHAIN_LEN  = 14
) (
  input  logic                            tclk,
  input  logic                            rst_n,
  input  logic                            se,
  input  logic [NUM_CHAINS-1:0]           scan_in,
  output logic [NUM_CHAINS-1:0]           scan_out,
  input  logic [NUM_CHAINS*CHAIN_LEN-1:0] d,
  output logic [NUM_CHAINS*CHAIN_LEN-1:0] q
);

  logic [NUM_CHAINS*CHAIN_LEN-1:0] shifted;

  always_comb
    for (int c = 0; c < int'(NUM_CHAINS); c++) begin
      shifted[c*CHAIN_LEN] = scan_in[c];
      for (int j = 1; j < int'(CHAIN_LEN); j++)
        shifted[c*CHAIN_LEN + j] = q[c*CHAIN_LEN + j - 1];
      scan_out[c] = q[c*CHAIN_LEN + CHAIN_LEN - 1];
    end

  always_ff @(posedge tclk or negedge rst_n) begin
    if (!rst_n)
      q <= '0;
    else
      q <= se ? shifted : d;
  end

endmodule
