// q_eq_comparator: reversible equality comparator of two 2-bit numbers.
//
// Two Feynman gates form x[i] ^ y[i] on the y lines, two NOT gates invert
// them (1 where the digits agree), and a Toffoli gate ANDs the two agreement
// bits onto the ancilla z. With z = 0, eq is 1 exactly when x == y. The x
// lines and the agreement bits are kept as outputs so the map is one-to-one.
// Purely combinational.
module q_eq_comparator (
  input  logic [1:0] x,
  input  logic [1:0] y,
  input  logic       z,    // ancilla, 0 for a comparison
  output logic [1:0] xo,   // x (garbage)
  output logic [1:0] dn,   // ~(x ^ y) (garbage)
  output logic       eq    // z ^ (x == y)
);
  logic [1:0] d, dn0;

  for (genvar i = 0; i < 2; i++) begin : g_bit
    feynman_gate u_x (.a(x[i]), .b(y[i]), .p(xo[i]), .q(d[i]));
  end
  assign dn0 = ~d;                                    // NOT gates
  toffoli_gate u_and (.a(dn0[1]), .b(dn0[0]), .c(z), .p(dn[1]), .q(dn[0]), .r(eq));
endmodule
