// qv_cell: trellis node (add-compare-select) of the Viterbi decoder.
//
// Two paths enter the node. For each, a branch_metric block forms the
// Hamming distance between the received symbol and the branch label, and a
// metric_adder adds it to the survivor metric of the predecessor state. The
// comparator with multiplexing (qcm) then keeps the smaller sum:
// o1 = 1 when the first path's metric X is strictly smaller than the second's
// Y, otherwise the second path survives, so a tie goes to the second path and
// is reported on tie. Metrics are W bits in and W+1 bits out. Purely
// combinational; the decoder registers pm_o once per trellis level.
module qv_cell #(
  parameter int unsigned W = 2    // width of the incoming path metrics
) (
  input  logic [1:0] a,      // received symbol {A1, A2}
  input  logic [1:0] b0,     // label of the first entering branch
  input  logic [1:0] b1,     // label of the second entering branch
  input  logic [W-1:0] pm0,  // survivor metric of the first predecessor
  input  logic [W-1:0] pm1,  // survivor metric of the second predecessor
  output logic [W:0] pm_o,   // survivor metric of this node
  output logic       o1,     // 1: first path survives
  output logic       tie     // the two candidate metrics were equal
);
  logic [1:0] hd0, hd1;
  logic [W:0] x, y;

  branch_metric u_bm0 (.a(a), .b(b0), .hd(hd0));
  branch_metric u_bm1 (.a(a), .b(b1), .hd(hd1));
  metric_adder #(.W(W)) u_add0 (.hd(hd0), .pm(pm0), .sum(x));
  metric_adder #(.W(W)) u_add1 (.hd(hd1), .pm(pm1), .sum(y));
  qcm #(.N(W+1)) u_qcm (.x(x), .y(y), .o1(o1), .tie(tie), .min_o(pm_o), .max_o());
endmodule
