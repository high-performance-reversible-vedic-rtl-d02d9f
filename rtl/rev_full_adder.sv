// Reversible full adder built from two Peres gates.
//
// The first Peres gate, with its C input at 0, produces a ^ b and a.b.
// The second takes (a ^ b, cin, a.b) and produces
//   sum  = a ^ b ^ cin
//   cout = (a ^ b).cin ^ a.b
// which is the majority function, since (a ^ b).cin and a.b are never both 1.
// The pass-through outputs of the two gates are brought out as garbage on g.
// The choice of Peres gates for this cell is a design choice of this library:
// the gates of the reversible ripple-carry adder's cells are otherwise open.
//
// Interface: a, b, cin in; sum, cout, g[1:0] (garbage) out.
// Timing: purely combinational, two gate levels from cin to cout.
module rev_full_adder (
  input  logic       a,
  input  logic       b,
  input  logic       cin,
  output logic       sum,
  output logic       cout,
  output logic [1:0] g
);
  logic ab_xor, ab_and;

  peres_gate u_pg0 (.a(a),      .b(b),   .c(1'b0),   .x(g[0]), .y(ab_xor), .z(ab_and));
  peres_gate u_pg1 (.a(ab_xor), .b(cin), .c(ab_and), .x(g[1]), .y(sum),    .z(cout));
endmodule
