// half_adder: one-bit half adder, the smallest cell of the Vedic multiplier.
// sum s = x ^ y, carry c = x & y. Purely combinational, no clock.
// Two of these build the crosswise and top columns of every 2x2 multiplier
// (vedic_2x2). The cell is the textbook half adder; the pin names x, y, s, c
// are this design's choice.
module half_adder (
  input  logic x,  // first addend
  input  logic y,  // second addend
  output logic s,  // sum
  output logic c   // carry
);
  assign s = x ^ y;
  assign c = x & y;
endmodule
