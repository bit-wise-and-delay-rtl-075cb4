// vedic_mul32: 32x32-bit unsigned Vedic multiplier, 64-bit product;
// the 32x32 multiplier, the largest size and the top of the design.
//
// The operands are split into halves of 16 bits, a = {aH, aL} and
// b = {bH, bL}, and four 16x16 Vedic multipliers form the vertical and
// crosswise products
//   q0 = aL*bL,  q1 = aH*bL,  q2 = aL*bH,  q3 = aH*bH      (32 bits each).
// Three adders then sum them at their weights:
//   q4 = q1 + (q0 >> 16)        32-bit adder
//   q5 = q2 + (q3 << 16)        48-bit adder
//   q6 = q4 + q5                48-bit adder
//   p  = {q6, q0[15:0]}
// so the low 16 bits of q0 go straight to the product and everything above
// them comes from q6. No sum can overflow its adder. The split into four
// half-size multipliers and one 32-bit plus two 48-bit adders follows the
// published recursive construction; the exact order in which the three sums
// are taken is this design's choice. The adders are cla_adder instances.
//
// Interface: a, b are the unsigned operands, p = a * b.
// Timing: purely combinational, no clock, registers or reset; a new product
// is valid one combinational delay after the operands change.
module vedic_mul32 (
    input  logic [31:0]  a,
    input  logic [31:0]  b,
    output logic [63:0] p
);
  localparam int unsigned N = 32;
  localparam int unsigned H = N / 2;

  logic [N-1:0]     q0, q1, q2, q3;   // partial products of the halves
  logic [N-1:0]     q4;               // q1 + upper half of q0
  logic [N+H-1:0]   q5;               // q2 + q3 shifted up by H
  logic [N+H-1:0]   q6;               // q4 + q5, bits H and above of p

  vedic_mul16 u_mul_ll (.a(a[H-1:0]), .b(b[H-1:0]), .p(q0));
  vedic_mul16 u_mul_hl (.a(a[N-1:H]), .b(b[H-1:0]), .p(q1));
  vedic_mul16 u_mul_lh (.a(a[H-1:0]), .b(b[N-1:H]), .p(q2));
  vedic_mul16 u_mul_hh (.a(a[N-1:H]), .b(b[N-1:H]), .p(q3));

  cla_adder #(.W(N)) u_add_mid (
      .x(q1),
      .y({{H{1'b0}}, q0[N-1:H]}),
      .s(q4)
  );

  cla_adder #(.W(N + H)) u_add_cross (
      .x({{H{1'b0}}, q2}),
      .y({q3, {H{1'b0}}}),
      .s(q5)
  );

  cla_adder #(.W(N + H)) u_add_final (
      .x({{H{1'b0}}, q4}),
      .y(q5),
      .s(q6)
  );

  assign p = {q6, q0[H-1:0]};
endmodule
