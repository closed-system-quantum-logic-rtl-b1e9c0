// q_eq_n: N-bit equality comparator built from 2-bit reversible comparators.
//
// The operands are cut into 2-bit slices (an odd top bit is paired with a
// constant 0 on both sides), each slice goes through a q_eq_comparator, and
// a chain of Toffoli gates ANDs the slice results. Purely combinational.
module q_eq_n #(
  parameter int unsigned N = 3    // operand width
) (
  input  logic [N-1:0] x,
  input  logic [N-1:0] y,
  output logic         eq    // x == y
);
  localparam int unsigned NS = (N + 1) / 2;     // 2-bit slices

  logic [2*NS-1:0] xp, yp;
  logic [NS-1:0]   eq_s;
  logic [NS:0]     acc;

  assign xp = (2*NS)'(x);
  assign yp = (2*NS)'(y);
  assign acc[0] = 1'b1;
  for (genvar k = 0; k < NS; k++) begin : g_slice
    q_eq_comparator u_eq (.x(xp[2*k +: 2]), .y(yp[2*k +: 2]), .z(1'b0),
                          .xo(), .dn(), .eq(eq_s[k]));
    toffoli_gate u_and (.a(acc[k]), .b(eq_s[k]), .c(1'b0), .p(), .q(), .r(acc[k+1]));
  end
  assign eq = acc[NS];
endmodule
