// vedic_16x16: 16x16 unsigned Vedic (Urdhva Tiryakbhyam) multiplier.
// The operands are split into halves AH/AL and BH/BL of 8 bits. Four
// vedic_8x8 multipliers form the "vertical" products AL*BL, AH*BH and the
// "crosswise" products AH*BL, AL*BH; three adders combine them:
//   s_cross = {AH*BH, 8'b0} + {8'b0, AH*BL}  (24-bit adder z6)
//   s_low   = AL*BH + {8'b0, (AL*BL)[15:8]}  (16-bit adder z5)
//   c[31:8] = s_cross + {8'b0, s_low}  (24-bit adder z7)
//   c[7:0] = (AL*BL)[7:0]
// Every level from 4x4 to 64x64 has this structure (up to which crosswise
// product goes to which adder).
// Instance names follow the published internal diagrams: z1 (AL*BL) feeds the
// output directly, z2 (AL*BH) feeds the N-bit adder z5, z6 is the first wide
// adder (both inputs zero-padded) and z7 the final one; z3 = AH*BL and
// z4 = AH*BH is this design's choice.
// No adder can overflow: s_low < 2^16 and the final sum is the product
// shifted right by 8 bits, below 2^24. The operands are unsigned and the
// block is purely combinational (no clock, no registers); both are this
// design's reading, as no timing is specified.
module vedic_16x16 (
  input  logic [15:0]  a,  // multiplicand
  input  logic [15:0]  b,  // multiplier
  output logic [31:0] c   // product a*b
);
  localparam int unsigned H  = 8;   // half width
  localparam int unsigned W3 = 24;   // width of the two wide adders

  logic [2*H-1:0] p_hh;  // AH*BH
  logic [2*H-1:0] p_hl;  // AH*BL
  logic [2*H-1:0] p_lh;  // AL*BH
  logic [2*H-1:0] p_ll;  // AL*BL
  logic [2*H-1:0] s_low;
  logic [W3-1:0]  s_cross;
  logic [W3-1:0]  s_top;

  vedic_8x8 z1 (.a(a[H-1:0]),   .b(b[H-1:0]),   .c(p_ll));
  vedic_8x8 z2 (.a(a[H-1:0]),   .b(b[2*H-1:H]), .c(p_lh));
  vedic_8x8 z3 (.a(a[2*H-1:H]), .b(b[H-1:0]),   .c(p_hl));
  vedic_8x8 z4 (.a(a[2*H-1:H]), .b(b[2*H-1:H]), .c(p_hh));

  add_n_bit #(.WIDTH(2*H)) z5 (
    .input1(p_lh),
    .input2({{H{1'b0}}, p_ll[2*H-1:H]}),
    .answer(s_low)
  );
  add_n_bit #(.WIDTH(W3)) z6 (
    .input1({p_hh, {H{1'b0}}}),
    .input2({{H{1'b0}}, p_hl}),
    .answer(s_cross)
  );
  add_n_bit #(.WIDTH(W3)) z7 (
    .input1(s_cross),
    .input2({{H{1'b0}}, s_low}),
    .answer(s_top)
  );

  assign c = {s_top, p_ll[H-1:0]};
endmodule
