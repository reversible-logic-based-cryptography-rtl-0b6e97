// scl_gate: 4x4 reversible SCL gate.
//
//   P = A,  Q = B,  R = C,  S = (A | B | C) ^ D
//
// The first three lines pass through; the fourth is flipped when any of the
// first three is set. Applying the gate twice restores the inputs, so the
// same gate undoes itself in the decryption path. The gate's name and its
// place in the cipher follow the design; the equation is the usual one from
// the reversible-logic literature, chosen here because the design does not
// spell it out. Purely combinational.
module scl_gate (
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
    q = b;
    r = c;
    s = (a | b | c) ^ d;
  end
endmodule : scl_gate
