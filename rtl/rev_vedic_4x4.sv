// 4x4 reversible Vedic multiplier (Urdhva Tiryakbhyam, "vertically
// and crosswise").
//
// The operands are split into 2-bit halves, A = {AH, AL} and B = {BH, BL}.
// Four 2x2 reversible Vedic multipliers form the vertical products
// AL*BL and AH*BH and the crosswise products AH*BL and AL*BH, all in
// parallel, and rev_vedic_merge adds them with three 4-bit reversible
// ripple-carry adders. The low 2 bits of AL*BL are product bits [1:0]
// directly. The recursive halving follows the published design; using four
// sub-multipliers (not two) at each level is what a full product requires.
//
// Interface: a[3:0], b[3:0] in; p[7:0] = a*b out (unsigned).
// Timing: purely combinational, no clock.
module rev_vedic_4x4 (
  input  logic [3:0]  a,
  input  logic [3:0]  b,
  output logic [7:0] p
);
  logic [3:0] q0, q1, q2, q3;

  rev_vedic_2x2 u_ll (.a(a[1:0]),  .b(b[1:0]),  .p(q0));  // AL*BL
  rev_vedic_2x2 u_hl (.a(a[3:2]), .b(b[1:0]),  .p(q1));  // AH*BL
  rev_vedic_2x2 u_lh (.a(a[1:0]),  .b(b[3:2]), .p(q2));  // AL*BH
  rev_vedic_2x2 u_hh (.a(a[3:2]), .b(b[3:2]), .p(q3));  // AH*BH

  rev_vedic_merge #(.N(4)) u_merge (.q0(q0), .q1(q1), .q2(q2), .q3(q3), .p(p));
endmodule
