// top: 64-bit unsigned Vedic multiplier, out = a * b (128-bit product).
// The product is built recursively by the Urdhva Tiryakbhyam ("vertically and
// crosswise") rule: vedic_64x64 splits each operand into 32-bit halves and
// uses four 32x32 multipliers and three adders (64, 96, 96 bits); each of
// those repeats the split down to 2x2 multipliers made of AND gates and half
// adders. The whole tree is combinational: out follows a and b after the
// propagation delay, with no clock, reset or handshake (no timing is
// specified, so this is this design's reading). Pin names and the single
// multiplier instance follow the published top-level schematic.
module top (
  input  logic [63:0]  a,    // multiplicand
  input  logic [63:0]  b,    // multiplier
  output logic [127:0] out   // product a*b
);
  vedic_64x64 dt (.a(a), .b(b), .c(out));
endmodule
