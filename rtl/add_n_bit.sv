// add_n_bit: WIDTH-bit binary adder, answer = input1 + input2 modulo 2^WIDTH.
// Every NxN multiplier level uses three of these: one of width N and two of
// width 3N/2 (16/24, 32/48, 64/96 bits and so on). The adder has no carry
// out; the multiplier levels are arranged so that no sum ever overflows its
// adder. The adder architecture is left to synthesis (a word-level '+'): only
// the adder's width and its place in the multiplier are fixed by the design.
// Purely combinational, no clock.
module add_n_bit #(
  parameter int unsigned WIDTH = 96  // widest adder of the 64-bit multiplier
) (
  input  logic [WIDTH-1:0] input1,
  input  logic [WIDTH-1:0] input2,
  output logic [WIDTH-1:0] answer
);
  assign answer = input1 + input2;
endmodule
