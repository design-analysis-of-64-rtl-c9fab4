// vedic_2x2: 2x2 unsigned multiplier by the Urdhva Tiryakbhyam
// ("vertically and crosswise") rule, the leaf of the recursive Vedic
// multiplier.
//   c[0] = a0b0                         (vertical, right column)
//   c[1] = a1b0 ^ a0b1                  (crosswise, half adder z1)
//   c[2] = a1b1 ^ carry(z1)             (vertical, left column, half adder z2)
//   c[3] = a1b1 & carry(z1)             (carry of z2)
// Four AND gates form the bit products and two half adders sum the columns,
// as in the published 2x2 diagrams. Which temp bit holds which product is
// this design's choice. Purely combinational, no clock.
module vedic_2x2 (
  input  logic [1:0] a,  // multiplicand
  input  logic [1:0] b,  // multiplier
  output logic [3:0] c   // product a*b
);
  logic [2:0] temp;   // bit products a1b0, a0b1, a1b1
  logic       carry1; // carry of the crosswise column

  assign c[0]    = a[0] & b[0];
  assign temp[0] = a[1] & b[0];
  assign temp[1] = a[0] & b[1];
  assign temp[2] = a[1] & b[1];

  half_adder z1 (.x(temp[0]), .y(temp[1]), .s(c[1]), .c(carry1));
  half_adder z2 (.x(temp[2]), .y(carry1),  .s(c[2]), .c(c[3]));
endmodule
