// Adder stage of an NxN reversible Vedic multiplier.
//
// An NxN product is split into four (N/2)x(N/2) products of the operand
// halves, q0 = AL*BL, q1 = AH*BL, q2 = AL*BH and q3 = AH*BH, each N bits
// wide, and
//   A*B = q0 + (q1 + q2) * 2^(N/2) + q3 * 2^N.
// This stage does that sum with three N-bit reversible ripple-carry adders:
//   RCA1: q1 + q2                                  -> s1, c1
//   RCA2: s1 + {zeros, q0[N-1:N/2]}  (zero padded)  -> s2, c2
//   RCA3: q3 + {zeros, c1^c2, s2[N-1:N/2]}          -> s3
// and the product is {s3, s2[N/2-1:0], q0[N/2-1:0]}: the low half of q0 is
// a product bit field as it stands. c1 and c2 are never both 1, because
// q1 + q2 + q0[N-1:N/2] < 2^(N+1), so their sum is c1^c2, taken from the Y
// output of a Peres gate. RCA3 cannot overflow since A*B < 2^(2N).
// The split into four sub-products, three N-bit RCAs, the direct pass of the
// low half of q0 and the zero padding follow the published structure; the
// order of the additions and the carry merge are choices of this library.
//
// Interface: q0..q3 [N-1:0] in, p [2N-1:0] out. N must be even and >= 4.
// Timing: purely combinational; RCA1 -> RCA2 -> RCA3 in series.
module rev_vedic_merge #(
  parameter int unsigned N = 16
) (
  input  logic [N-1:0]   q0,
  input  logic [N-1:0]   q1,
  input  logic [N-1:0]   q2,
  input  logic [N-1:0]   q3,
  output logic [2*N-1:0] p
);
  localparam int unsigned H = N / 2;

  logic [N-1:0] s1, s2, s3;
  logic [N-1:0] q0_hi_padded, mid_hi_padded;
  logic         c1, c2, c3, c12;
  logic         pg_x, pg_z;  // garbage outputs of the carry-merge Peres gate

  assign q0_hi_padded = {{H{1'b0}}, q0[N-1:H]};

  rev_rca #(.WIDTH(N)) u_rca1 (.a(q1), .b(q2),           .cin(1'b0), .sum(s1), .cout(c1));
  rev_rca #(.WIDTH(N)) u_rca2 (.a(s1), .b(q0_hi_padded), .cin(1'b0), .sum(s2), .cout(c2));

  peres_gate u_pg_carry (.a(c1), .b(c2), .c(1'b0), .x(pg_x), .y(c12), .z(pg_z));

  assign mid_hi_padded = {{(H-1){1'b0}}, c12, s2[N-1:H]};

  rev_rca #(.WIDTH(N)) u_rca3 (.a(q3), .b(mid_hi_padded), .cin(1'b0), .sum(s3), .cout(c3));

  assign p = {s3, s2[H-1:0], q0[H-1:0]};

  initial begin
    assert (N >= 4 && N % 2 == 0)
      else $error("rev_vedic_merge: N must be even and at least 4");
  end
endmodule
