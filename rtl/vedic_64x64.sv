// vedic_64x64: 64x64 unsigned Vedic (Urdhva Tiryakbhyam) multiplier.
// The operands are split into halves AH/AL and BH/BL of 32 bits. Four
// vedic_32x32 multipliers form the "vertical" products AL*BL, AH*BH and the
// "crosswise" products AH*BL, AL*BH; three adders combine them:
//   s_cross = {AH*BH, 32'b0} + {32'b0, AH*BL}  (96-bit adder z6)
//   s_low   = AL*BH + {32'b0, (AL*BL)[63:32]}  (64-bit adder z5)
//   c[127:32] = s_cross + {32'b0, s_low}  (96-bit adder z7)
//   c[31:0] = (AL*BL)[31:0]
// Every level from 4x4 to 64x64 has this structure (up to which crosswise
// product goes to which adder).
// Instance names follow the published internal diagrams: z1 (AL*BL) feeds the
// output directly, z2 (AL*BH) feeds the N-bit adder z5, z6 is the first wide
// adder (both inputs zero-padded) and z7 the final one; z3 = AH*BL and
// z4 = AH*BH is this design's choice.
// No adder can overflow: s_low < 2^64 and the final sum is the product
// shifted right by 32 bits, below 2^96. The operands are unsigned and the
// block is purely combinational (no clock, no registers); both are this
// design's reading, as no timing is specified.
module vedic_64x64 (
  input  logic [63:0]  a,  // multiplicand
  input  logic [63:0]  b,  // multiplier
  output logic [127:0] c   // product a*b
);
  localparam int unsigned H  = 32;   // half width
  localparam int unsigned W3 = 96;   // width of the two wide adders

  logic [2*H-1:0] p_hh;  // AH*BH
  logic [2*H-1:0] p_hl;  // AH*BL
  logic [2*H-1:0] p_lh;  // AL*BH
  logic [2*H-1:0] p_ll;  // AL*BL
  logic [2*H-1:0] s_low;
  logic [W3-1:0]  s_cross;
  logic [W3-1:0]  s_top;

  vedic_32x32 z1 (.a(a[H-1:0]),   .b(b[H-1:0]),   .c(p_ll));
  vedic_32x32 z2 (.a(a[H-1:0]),   .b(b[2*H-1:H]), .c(p_lh));
  vedic_32x32 z3 (.a(a[2*H-1:H]), .b(b[H-1:0]),   .c(p_hl));
  vedic_32x32 z4 (.a(a[2*H-1:H]), .b(b[2*H-1:H]), .c(p_hh));

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
