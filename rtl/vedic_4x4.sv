// vedic_4x4: 4x4 unsigned Vedic (Urdhva Tiryakbhyam) multiplier.
// The operands are split into halves AH/AL and BH/BL of 2 bits. Four
// vedic_2x2 multipliers form the "vertical" products AL*BL, AH*BH and the
// "crosswise" products AH*BL, AL*BH; three adders combine them:
//   s_cross = {AH*BH, 2'b0} + {2'b0, AL*BH}  (6-bit adder z6)
//   s_low   = AH*BL + {2'b0, (AL*BL)[3:2]}  (4-bit adder z5)
//   c[7:2] = s_cross + {2'b0, s_low}  (6-bit adder z7)
//   c[1:0] = (AL*BL)[1:0]
// Every level from 4x4 to 64x64 has this structure (up to which crosswise
// product goes to which adder).
// At this level the reference block diagram sends the crosswise product AH*BL
// to the narrow adder and AL*BH to the wide one; the 16x16 and wider levels
// swap the two, as in the reference 64x64 diagram. The sum is the same.
// Instance names as in the wider levels: z1 = AL*BL, z2 = the sub-product
// feeding z5, z6 the first wide adder, z7 the final one.
// No adder can overflow: s_low < 2^4 and the final sum is the product
// shifted right by 2 bits, below 2^6. The operands are unsigned and the
// block is purely combinational (no clock, no registers); both are this
// design's reading, as no timing is specified.
module vedic_4x4 (
  input  logic [3:0]  a,  // multiplicand
  input  logic [3:0]  b,  // multiplier
  output logic [7:0] c   // product a*b
);
  localparam int unsigned H  = 2;   // half width
  localparam int unsigned W3 = 6;   // width of the two wide adders

  logic [2*H-1:0] p_hh;  // AH*BH
  logic [2*H-1:0] p_hl;  // AH*BL
  logic [2*H-1:0] p_lh;  // AL*BH
  logic [2*H-1:0] p_ll;  // AL*BL
  logic [2*H-1:0] s_low;
  logic [W3-1:0]  s_cross;
  logic [W3-1:0]  s_top;

  vedic_2x2 z1 (.a(a[H-1:0]),   .b(b[H-1:0]),   .c(p_ll));
  vedic_2x2 z2 (.a(a[2*H-1:H]), .b(b[H-1:0]),   .c(p_hl));
  vedic_2x2 z3 (.a(a[H-1:0]),   .b(b[2*H-1:H]), .c(p_lh));
  vedic_2x2 z4 (.a(a[2*H-1:H]), .b(b[2*H-1:H]), .c(p_hh));

  add_n_bit #(.WIDTH(2*H)) z5 (
    .input1(p_hl),
    .input2({{H{1'b0}}, p_ll[2*H-1:H]}),
    .answer(s_low)
  );
  add_n_bit #(.WIDTH(W3)) z6 (
    .input1({p_hh, {H{1'b0}}}),
    .input2({{H{1'b0}}, p_lh}),
    .answer(s_cross)
  );
  add_n_bit #(.WIDTH(W3)) z7 (
    .input1(s_cross),
    .input2({{H{1'b0}}, s_low}),
    .answer(s_top)
  );

  assign c = {s_top, p_ll[H-1:0]};
endmodule
