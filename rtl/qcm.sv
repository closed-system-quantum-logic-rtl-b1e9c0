// qcm: comparator with multiplexing, the select stage of a trellis node.
//
// An iterative comparator decides o1 = (x < y). One Fredkin gate per bit,
// all controlled by o1, routes x to min_o when o1 = 1 and y otherwise; the
// other number leaves on max_o, so nothing is lost. A tie (x == y) selects
// y, the second entering path, which is the behaviour the select rule
// "O1 = 1 only if X < Y" implies. Purely combinational.
module qcm #(
  parameter int unsigned N = 3    // metric width
) (
  input  logic [N-1:0] x,      // metric of the first entering path
  input  logic [N-1:0] y,      // metric of the second entering path
  output logic         o1,     // 1: x selected
  output logic         tie,    // x == y
  output logic [N-1:0] min_o,  // selected (smaller) metric
  output logic [N-1:0] max_o   // rejected metric
);
  q_comparator #(.N(N)) u_cmp (.x(x), .y(y), .lt(o1), .eq(tie), .gt());

  for (genvar i = 0; i < N; i++) begin : g_mux
    // control 1 swaps: q = x[i], r = y[i]; control 0: q = y[i], r = x[i]
    fredkin_gate u_sel (.c(o1), .a(y[i]), .b(x[i]), .p(), .q(min_o[i]), .r(max_o[i]));
  end
endmodule
