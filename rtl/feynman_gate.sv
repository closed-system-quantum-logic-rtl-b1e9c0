// feynman_gate: reversible controlled-NOT (quantum XOR) gate.
//
// Maps (a, b) to (p, q) = (a, a ^ b). It is its own inverse. Only the
// permutation of basis states is modelled, as a two-state digital circuit;
// superposed inputs are outside what RTL can express. Purely combinational.
module feynman_gate (
  input  logic a,   // control
  input  logic b,   // target
  output logic p,   // a
  output logic q    // a ^ b
);
  assign p = a;
  assign q = a ^ b;
endmodule
