// q_subtractor: reversible (quantum) half-subtractor.
//
// Computes the difference d = a ^ b and the borrow ~a & b of a - b, the
// borrow landing on the ancilla z. The gates are a NOT on a, a Toffoli on
// (~a, b, z), a second NOT restoring a, and a Feynman gate forming a ^ b.
// In this design two of these give the per-digit "less" and "greater" terms
// of the iterative comparator. Purely combinational.
module q_subtractor (
  input  logic a,    // minuend
  input  logic b,    // subtrahend
  input  logic z,    // ancilla, 0 for a subtraction
  output logic p,    // a (garbage output)
  output logic d,    // a ^ b
  output logic bo    // z ^ (~a & b)
);
  logic an, an1, b1, a2;

  assign an = ~a;                                   // NOT gate
  toffoli_gate u_borrow (.a(an), .b(b), .c(z), .p(an1), .q(b1), .r(bo));
  assign a2 = ~an1;                                 // NOT gate
  feynman_gate u_diff (.a(a2), .b(b1), .p(p), .q(d));
endmodule
