// ora: comparison-based output response analyzer with a carry-chain OR.
//
// One ORA watches one output of two block RAMs under test that receive the
// same test patterns. Each enabled clock it compares the two bits (the
// equivalence function of a LUT) and ANDs the result with its own flip-flop,
// so the flip-flop holds 1 (pass) until the first mismatch and then stays at 0
// (fail) until reset. The flip-flop's contents are the diagnostic record that
// a readback of the configuration memory would obtain.
//
// The pass/fail flip-flop also steers one stage of a carry multiplexer:
// carry_out = pass ? carry_in : 1. Chained through all ORAs with a 0 at the
// start, the last carry_out is the OR of all fail indications, a single bit
// that tells pass or fail without a readback.
//
// Timing: `ce` gates the comparison (the TPG clears it for test vectors that
// must not be compared); `rst` is synchronous and sets the flip-flop to pass.
// The comparator, the sticky AND, the flip-flop and the carry multiplexer with
// its 0 and 1 inputs follow the method's ORA; the polarity of the flip-flop
// (1 = pass) and of the chain (1 = fail) are this design's reading of it.
module ora (
  input  logic clk,
  input  logic rst,
  input  logic ce,
  input  logic a,        // output i of RAM j
  input  logic b,        // output i of RAM k
  input  logic cin,
  output logic pass,
  output logic cout
);

  always_ff @(posedge clk) begin
    if (rst)     pass <= 1'b1;
    else if (ce) pass <= pass & ~(a ^ b);
  end

  assign cout = pass ? cin : 1'b1;

endmodule
