// 8x8 reversible Vedic multiplier (Urdhva Tiryakbhyam, "vertically
// and crosswise").
//
// The operands are split into 4-bit halves, A = {AH, AL} and B = {BH, BL}.
// Four 4x4 reversible Vedic multipliers form the vertical products
// AL*BL and AH*BH and the crosswise products AH*BL and AL*BH, all in
// parallel, and rev_vedic_merge adds them with three 8-bit reversible
// ripple-carry adders. The low 4 bits of AL*BL are product bits [3:0]
// directly. The recursive halving follows the published design; using four
// sub-multipliers (not two) at each level is what a full product requires.
//
// Interface: a[7:0], b[7:0] in; p[15:0] = a*b out (unsigned).
// Timing: purely combinational, no clock.
module rev_vedic_8x8 (
  input  logic [7:0]  a,
  input  logic [7:0]  b,
  output logic [15:0] p
);
  logic [7:0] q0, q1, q2, q3;

  rev_vedic_4x4 u_ll (.a(a[3:0]),  .b(b[3:0]),  .p(q0));  // AL*BL
  rev_vedic_4x4 u_hl (.a(a[7:4]), .b(b[3:0]),  .p(q1));  // AH*BL
  rev_vedic_4x4 u_lh (.a(a[3:0]),  .b(b[7:4]), .p(q2));  // AL*BH
  rev_vedic_4x4 u_hh (.a(a[7:4]), .b(b[7:4]), .p(q3));  // AH*BH

  rev_vedic_merge #(.N(8)) u_merge (.q0(q0), .q1(q1), .q2(q2), .q3(q3), .p(p));
endmodule
