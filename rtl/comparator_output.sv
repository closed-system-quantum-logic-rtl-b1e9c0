// comparator_output: output circuit of the iterative comparator.
//
// From the final flags of the last cell it produces the three relations:
// lt = l, gt = g, and eq = ~g & ~l (a Toffoli on NOT-ed flags). Purely
// combinational; the gate choice is this design's.
module comparator_output (
  input  logic g,    // X > Y
  input  logic l,    // X < Y
  output logic lt,   // X < Y
  output logic eq,   // X == Y
  output logic gt    // X > Y
);
  logic gn, ln;

  assign gn = ~g;                                     // NOT gates
  assign ln = ~l;
  toffoli_gate u_eq (.a(gn), .b(ln), .c(1'b0), .p(), .q(), .r(eq));
  assign lt = l;
  assign gt = g;
endmodule
