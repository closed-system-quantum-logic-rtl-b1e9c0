// q_half_adder: reversible (quantum) half-adder, QHA.
//
// A Toffoli gate writes a & b onto the ancilla z, then a Feynman gate turns b
// into a ^ b. With z = 0 the outputs are the half-adder sum s and carry c of
// the truth table for a + b; p keeps a so the mapping stays one-to-one.
// Composition of two gates as used here is this design's choice; the function
// is the half-adder's. Purely combinational.
module q_half_adder (
  input  logic a,
  input  logic b,
  input  logic z,   // ancilla, 0 for a half-add
  output logic p,   // a (garbage output)
  output logic s,   // a ^ b
  output logic c    // z ^ (a & b)
);
  logic a1, b1;

  toffoli_gate u_and (.a(a),  .b(b),  .c(z), .p(a1), .q(b1), .r(c));
  feynman_gate u_xor (.a(a1), .b(b1), .p(p),  .q(s));
endmodule
