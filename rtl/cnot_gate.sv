// cnot_gate: 2x2 reversible CNOT gate, also called the Feynman gate.
//
//   P = A,  Q = A ^ B
//
// The control A passes through and inverts the target B when set. The gate
// is its own inverse; the encryption path uses it to mix the two halves of a
// word and the decryption path uses it again to separate them.
// Combinational.
module cnot_gate (
  input  logic a,
  input  logic b,
  output logic p,
  output logic q
);
  always_comb begin
    p = a;
    q = a ^ b;
  end
endmodule : cnot_gate
