// toffoli_gate: reversible controlled-controlled-NOT gate.
//
// Maps (a, b, c) to (a, b, c ^ (a & b)). With c = 0 it computes AND; with
// c = 1 it computes NAND, which is how this design builds OR by De Morgan.
// It is its own inverse. Purely combinational.
module toffoli_gate (
  input  logic a,   // control 1
  input  logic b,   // control 2
  input  logic c,   // target
  output logic p,   // a
  output logic q,   // b
  output logic r    // c ^ (a & b)
);
  assign p = a;
  assign q = b;
  assign r = c ^ (a & b);
endmodule
