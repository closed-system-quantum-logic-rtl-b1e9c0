// q_full_adder: reversible (quantum) full-adder, QFA.
//
// Two Toffoli/Feynman stages: the first writes a & b onto the ancilla z and
// turns b into a ^ b; the second adds (a ^ b) & ci to the ancilla, giving the
// majority (carry out), and turns ci into a ^ b ^ ci (sum). With z = 0 the
// outputs follow the full-adder truth table. a and a ^ b are garbage outputs.
// The gate arrangement is this design's choice. Purely combinational.
module q_full_adder (
  input  logic a,
  input  logic b,
  input  logic ci,   // carry in
  input  logic z,    // ancilla, 0 for an addition
  output logic p,    // a (garbage)
  output logic q,    // a ^ b (garbage)
  output logic s,    // a ^ b ^ ci
  output logic co    // z ^ majority(a, b, ci)
);
  logic a1, b1, z1, x1, b2, c1;

  toffoli_gate u_t1 (.a(a),  .b(b),  .c(z),  .p(a1), .q(b1), .r(z1));
  feynman_gate u_f1 (.a(a1), .b(b1), .p(p),  .q(x1));
  toffoli_gate u_t2 (.a(x1), .b(ci), .c(z1), .p(b2), .q(c1), .r(co));
  feynman_gate u_f2 (.a(b2), .b(c1), .p(q),  .q(s));
endmodule
