// toffoli_gate: 3x3 reversible Toffoli (controlled-controlled-NOT) gate.
//
//   P = A,  Q = B,  R = (A & B) ^ C
//
// A and B are the controls and pass through; the target C is inverted when
// both controls are 1. The gate is its own inverse. Which of the three lines
// is the target is this implementation's choice (the third). Combinational.
module toffoli_gate (
  input  logic a,
  input  logic b,
  input  logic c,
  output logic p,
  output logic q,
  output logic r
);
  always_comb begin
    p = a;
    q = b;
    r = (a & b) ^ c;
  end
endmodule : toffoli_gate
