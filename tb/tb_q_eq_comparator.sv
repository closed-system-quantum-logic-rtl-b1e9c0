// tb_q_eq_comparator: exhaustive test of the 2-bit reversible equality
// comparator. For all x, y and ancilla values it checks eq = z ^ (x == y),
// the garbage outputs, and that the 5-bit map is one-to-one.
module tb_q_eq_comparator;
  int checks = 0, failures = 0;
  logic [1:0] x, y, xo, dn;
  logic z, eq;
  bit seen [int];

  q_eq_comparator dut (.x(x), .y(y), .z(z), .xo(xo), .dn(dn), .eq(eq));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 32; v++) begin
      {x, y, z} = v[4:0];
      #1;
      checks++;
      if (eq !== (z ^ (x == y)) || xo !== x || dn !== ~(x ^ y)) begin
        failures++;
        $display("FAIL x=%b y=%b z=%b eq=%b", x, y, z, eq);
      end
      checks++;
      if (seen.exists(int'({xo, dn, eq}))) failures++;
      seen[int'({xo, dn, eq})] = 1'b1;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
