// fredkin_gate: reversible controlled-swap gate, used as a 2:1 multiplexer.
//
// Maps (c, a, b) to (c, c ? b : a, c ? a : b): when the control is 1 the two
// data lines are exchanged. Output q is therefore a multiplexer of a and b and
// output r carries the other input, so no information is lost. The swap-on-1
// convention is this design's choice. Purely combinational.
module fredkin_gate (
  input  logic c,   // control
  input  logic a,   // data line 0
  input  logic b,   // data line 1
  output logic p,   // c
  output logic q,   // c ? b : a
  output logic r    // c ? a : b
);
  assign p = c;
  assign q = c ? b : a;
  assign r = c ? a : b;
endmodule
