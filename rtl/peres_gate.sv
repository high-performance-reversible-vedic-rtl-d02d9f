// Peres gate: a 3-input, 3-output reversible logic gate (quantum cost 5).
//
//   X = A
//   Y = A ^ B
//   Z = A.B ^ C
//
// With C = 0 the gate is a half adder: Y is the sum and Z the carry of A + B.
// Two cascaded Peres gates make a full adder (see rev_full_adder).
//
// Interface: single-bit inputs a, b, c; single-bit outputs x, y, z.
// Timing: purely combinational.
module peres_gate (
  input  logic a,
  input  logic b,
  input  logic c,
  output logic x,
  output logic y,
  output logic z
);
  always_comb begin
    x = a;
    y = a ^ b;
    z = (a & b) ^ c;
  end
endmodule
