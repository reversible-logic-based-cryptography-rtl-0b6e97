// fredkin_gate: 3x3 reversible Fredkin (controlled-swap) gate.
//
//   P = A,  Q = A ? C : B,  R = A ? B : C
//
// The control A passes through; when it is 1 the other two lines swap. The
// gate keeps the number of ones and is its own inverse. The control is the
// first line (this implementation's choice). Combinational.
module fredkin_gate (
  input  logic a,
  input  logic b,
  input  logic c,
  output logic p,
  output logic q,
  output logic r
);
  always_comb begin
    p = a;
    q = a ? c : b;
    r = a ? b : c;
  end
endmodule : fredkin_gate
