// branch_metric: Hamming distance between a received symbol and a branch label.
//
// Two Feynman gates XOR the received bits {A1, A2} onto the branch bits
// {B1, B2}; a reversible half-adder then counts the two difference bits.
// hd = {carry, sum} is 0, 1 or 2. Purely combinational.
module branch_metric (
  input  logic [1:0] a,    // received {A1, A2}
  input  logic [1:0] b,    // trellis branch label {B1, B2}
  output logic [1:0] hd    // Hamming distance {c, s}
);
  logic [1:0] d;

  feynman_gate u_x1 (.a(a[1]), .b(b[1]), .p(), .q(d[1]));
  feynman_gate u_x2 (.a(a[0]), .b(b[0]), .p(), .q(d[0]));
  q_half_adder u_ha (.a(d[1]), .b(d[0]), .z(1'b0), .p(), .s(hd[0]), .c(hd[1]));
endmodule
