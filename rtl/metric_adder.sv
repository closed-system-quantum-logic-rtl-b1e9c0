// metric_adder: adds a 2-bit branch metric to a W-bit path metric.
//
// Bit 0 is a reversible half-adder (pm[0] + s), bit 1 a reversible full-adder
// (pm[1] + c + carry); every further bit of a wider metric is one more
// full-adder whose second operand is 0. The result has W+1 bits, the top bit
// being the last carry, so it never overflows. W = 2 gives the 3-bit metric
// of the basic trellis node. Purely combinational, ripple carry.
module metric_adder #(
  parameter int unsigned W = 2    // width of the previous path metric, >= 2
) (
  input  logic [1:0]   hd,    // branch metric {c, s}
  input  logic [W-1:0] pm,    // previous path metric
  output logic [W:0]   sum    // new path metric
);
  logic [W:1] cy;            // cy[i] is the carry into bit i

  q_half_adder u_b0 (.a(pm[0]), .b(hd[0]), .z(1'b0), .p(), .s(sum[0]), .c(cy[1]));
  q_full_adder u_b1 (.a(pm[1]), .b(hd[1]), .ci(cy[1]), .z(1'b0),
                     .p(), .q(), .s(sum[1]), .co(cy[2]));
  for (genvar i = 2; i < W; i++) begin : g_ext
    q_full_adder u_bi (.a(pm[i]), .b(1'b0), .ci(cy[i]), .z(1'b0),
                       .p(), .q(), .s(sum[i]), .co(cy[i+1]));
  end
  assign sum[W] = cy[W];
endmodule
