// q_comparator: iterative N-digit magnitude comparator network.
//
// N comparator cells are chained from the most significant digit (x[N-1])
// down to the least, starting with both flags 0, and one output circuit
// turns the final flags into lt / eq / gt. Extending it to more digits only
// adds cells. Purely combinational; the ripple depth is N cells.
module q_comparator #(
  parameter int unsigned N = 3    // digits per number
) (
  input  logic [N-1:0] x,
  input  logic [N-1:0] y,
  output logic         lt,   // x < y
  output logic         eq,   // x == y
  output logic         gt    // x > y
);
  logic [N:0] g, l;          // g[N], l[N] enter the MSB cell

  assign g[N] = 1'b0;
  assign l[N] = 1'b0;
  for (genvar i = N - 1; i >= 0; i--) begin : g_cell
    comparator_cell u_cell (.gi(g[i+1]), .li(l[i+1]), .x(x[i]), .y(y[i]),
                            .go(g[i]), .lo(l[i]));
  end
  comparator_output u_out (.g(g[0]), .l(l[0]), .lt(lt), .eq(eq), .gt(gt));
endmodule
