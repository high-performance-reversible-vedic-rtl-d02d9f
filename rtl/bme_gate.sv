// BME gate: a 4-input, 4-output reversible logic gate.
//
//   P = A
//   Q = A.B  ^ C
//   R = A.D  ^ C
//   S = A'.B ^ C ^ D
//
// In the multipliers of this library the gate is used with C = 0, so that
// Q and R give the two bit products A.B and A.D from a single copy of A;
// P and S are garbage outputs. The P, Q and R equations follow the published
// BME gate; the form of S (with its D term) is the usual definition of the
// gate and is not used by any multiplier here.
//
// Interface: four single-bit inputs a..d, four single-bit outputs p..s.
// Timing: purely combinational.
module bme_gate (
  input  logic a,
  input  logic b,
  input  logic c,
  input  logic d,
  output logic p,
  output logic q,
  output logic r,
  output logic s
);
  always_comb begin
    p = a;
    q = (a & b) ^ c;
    r = (a & d) ^ c;
    s = (~a & b) ^ c ^ d;
  end
endmodule
