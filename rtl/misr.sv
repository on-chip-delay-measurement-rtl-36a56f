`timescale 1ps/10fs
// misr: multiple-input signature register compacting the scan-chain outputs.
//
// WIDTH-bit (default 16) internal-XOR signature register with the same
// maximal-length feedback as the pattern generator. On each enabled step the
// register shifts left, the feedback bit enters at bit 0, and scan output k is
// XORed into bit k. The signature after every pattern is compared with a
// golden signature by the BIST sequencer; because the signature accumulates,
// a failure of one pattern also fails the patterns after it. Using a MISR for
// the pass/fail decision follows the measurement method; width, polynomial
// and timing are this design's.
//
// Timing: updates on the falling edge of clk, clear wins over en.
module misr #(
  parameter int unsigned WIDTH  = 16,
  parameter int unsigned NUM_IN = 4,
  parameter logic [WIDTH-1:0] TAPS = 16'hB400
) (
  input  logic              clk,
  input  logic              clear,
  input  logic              en,
  input  logic [NUM_IN-1:0] data,
  output logic [WIDTH-1:0]  signature
);

  logic [WIDTH-1:0] injected;

  always_comb begin
    injected = {signature[WIDTH-2:0], ^(signature & TAPS)};
    for (int k = 0; k < int'(NUM_IN); k++)
      injected[k] = injected[k] ^ data[k];
  end

  always_ff @(negedge clk) begin
    if (clear)
      signature <= '0;
    else if (en)
      signature <= injected;
  end

  initial assert (NUM_IN <= WIDTH) else $error("misr: more inputs than bits");

endmodule
