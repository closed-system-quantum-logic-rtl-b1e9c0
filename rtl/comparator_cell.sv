// comparator_cell: one digit of the iterative magnitude comparator.
//
// The network scans X and Y from the most significant digit. Each cell
// receives gi (X > Y already decided) and li (X < Y already decided) and
// passes on
//     go = gi | (~li &  x & ~y)
//     lo = li | (~gi & ~x &  y)
// so the first differing digit decides and later digits cannot change it.
// The terms x & ~y and ~x & y are the borrows of two reversible
// half-subtractors (y - x and x - y); Toffoli gates then combine them with
// the incoming flags, OR being a Toffoli on inverted inputs with the target
// preset to 1. These equations are the classic iterative comparator, chosen
// by this design. Purely combinational.
module comparator_cell (
  input  logic gi,   // X > Y so far
  input  logic li,   // X < Y so far
  input  logic x,    // digit of X
  input  logic y,    // digit of Y
  output logic go,   // X > Y after this digit
  output logic lo    // X < Y after this digit
);
  logic x_gt, x_lt;          // x & ~y, ~x & y
  logic tg, tl;              // new decisions that the other flag does not block

  // borrow of (y - x) is ~y & x; borrow of (x - y) is ~x & y
  q_subtractor u_gt (.a(y), .b(x), .z(1'b0), .p(), .d(), .bo(x_gt));
  q_subtractor u_lt (.a(x), .b(y), .z(1'b0), .p(), .d(), .bo(x_lt));

  toffoli_gate u_tg (.a(~li), .b(x_gt), .c(1'b0), .p(), .q(), .r(tg));
  toffoli_gate u_tl (.a(~gi), .b(x_lt), .c(1'b0), .p(), .q(), .r(tl));

  // OR by De Morgan: a | b = 1 ^ (~a & ~b)
  toffoli_gate u_og (.a(~gi), .b(~tg), .c(1'b1), .p(), .q(), .r(go));
  toffoli_gate u_ol (.a(~li), .b(~tl), .c(1'b1), .p(), .q(), .r(lo));
endmodule
