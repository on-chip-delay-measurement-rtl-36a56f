`timescale 1ps/10fs
// lfsr: pseudo-random test pattern generator that feeds the scan chains.
//
// A Fibonacci LFSR of WIDTH bits (default 16, feedback polynomial
// x^16 + x^14 + x^13 + x^11 + 1, a maximal-length polynomial). The state can be
// loaded with a seed, so the test patterns of one BIST run are reproducible;
// a zero seed is replaced by 1 because the all-zero state is a lock-up state.
// Scan input k of the NUM_OUT scan chains is state bit (k * WIDTH / NUM_OUT),
// so the chains receive differently shifted copies of the sequence.
// The generator as such (pseudo-random patterns from an LFSR, seeded for
// fault coverage) follows the measurement method; width, polynomial, the tap
// choice for the chain inputs and the falling-edge timing are this design's.
//
// Timing: the register updates on the falling edge of clk when load or adv is
// high (load wins). The scan chains shift on a rising edge, so the values
// they take in never change on the same edge.
module lfsr #(
  parameter int unsigned WIDTH   = 16,
  parameter int unsigned NUM_OUT = 4,
  parameter logic [WIDTH-1:0] TAPS = 16'hB400  // bit i set: state[i] in feedback
) (
  input  logic               clk,
  input  logic               load,   // load seed
  input  logic [WIDTH-1:0]   seed,
  input  logic               adv,    // advance one step
  output logic [WIDTH-1:0]   state,
  output logic [NUM_OUT-1:0] scan_in
);

  logic feedback;
  assign feedback = ^(state & TAPS);

  always_ff @(negedge clk) begin
    if (load)
      state <= (seed == '0) ? WIDTH'(1) : seed;
    else if (adv)
      state <= {state[WIDTH-2:0], feedback};
  end

  always_comb
    for (int k = 0; k < int'(NUM_OUT); k++)
      scan_in[k] = state[(k * WIDTH) / NUM_OUT];

endmodule
