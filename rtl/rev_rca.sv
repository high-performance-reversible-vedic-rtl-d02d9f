// Reversible ripple-carry adder of WIDTH bits.
//
// A chain of WIDTH reversible full adders (two Peres gates each); the carry
// ripples from bit 0 to bit WIDTH-1. The Vedic multipliers use three of these
// per level, 16 bits wide at the 16x16 level, with cin tied to 0. The carry
// input itself is an addition of this library. The garbage outputs of the
// cells are left unconnected inside the adder.
//
// Interface: a, b [WIDTH-1:0], cin in; sum [WIDTH-1:0], cout out.
// Timing: purely combinational; the critical path is the carry chain,
// 2*WIDTH Peres gates long.
module rev_rca #(
  parameter int unsigned WIDTH = 16
) (
  input  logic [WIDTH-1:0] a,
  input  logic [WIDTH-1:0] b,
  input  logic             cin,
  output logic [WIDTH-1:0] sum,
  output logic             cout
);
  logic [WIDTH:0] carry;
  assign carry[0] = cin;

  for (genvar i = 0; i < WIDTH; i++) begin : g_bit
    logic [1:0] garbage;
    rev_full_adder u_fa (
      .a   (a[i]),
      .b   (b[i]),
      .cin (carry[i]),
      .sum (sum[i]),
      .cout(carry[i+1]),
      .g   (garbage)
    );
  end

  assign cout = carry[WIDTH];
endmodule
