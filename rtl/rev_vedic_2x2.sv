// 2x2 reversible Vedic multiplier: the leaf of the Urdhva Tiryakbhyam
// ("vertically and crosswise") multiplier tree.
//
// For A = a1a0 and B = b1b0:
//   s0    = a0.b0                 (vertical)
//   c1 s1 = a1.b0 + a0.b1         (crosswise)
//   s3 s2 = c1 + a1.b1            (vertical)
// Two BME gates, each with C = 0, make the four bit products: the first
// takes a0 and gives a0.b0 (= s0) and a0.b1, the second takes a1 and gives
// a1.b0 and a1.b1. Two Peres gates, each with C = 0, are the half adders:
// the first adds the two crosswise products, the second adds a1.b1 and the
// carry c1. This gate count (2 BME + 2 Peres) follows the published design.
//
// Interface: a[1:0], b[1:0] in; p[3:0] = a*b out (unsigned).
// Timing: purely combinational.
module rev_vedic_2x2 (
  input  logic [1:0] a,
  input  logic [1:0] b,
  output logic [3:0] p
);
  logic a0b0, a0b1, a1b0, a1b1;
  logic c1;
  // Garbage outputs of the gates.
  logic bme0_p, bme0_s, bme1_p, bme1_s, pg0_x, pg1_x;

  bme_gate u_bme0 (.a(a[0]), .b(b[0]), .c(1'b0), .d(b[1]),
                   .p(bme0_p), .q(a0b0), .r(a0b1), .s(bme0_s));
  bme_gate u_bme1 (.a(a[1]), .b(b[0]), .c(1'b0), .d(b[1]),
                   .p(bme1_p), .q(a1b0), .r(a1b1), .s(bme1_s));

  peres_gate u_pg0 (.a(a0b1), .b(a1b0), .c(1'b0), .x(pg0_x), .y(p[1]), .z(c1));
  peres_gate u_pg1 (.a(a1b1), .b(c1),   .c(1'b0), .x(pg1_x), .y(p[2]), .z(p[3]));

  assign p[0] = a0b0;
endmodule
