// tb_toffoli_gate: exhaustive self-checking testbench for toffoli_gate.
//
// Applies every input combination, compares each output with an expression
// of the gate's truth table written here independently of the module, and
// checks that distinct inputs give distinct outputs (the map is one-to-one).
module tb_toffoli_gate;
  int checks = 0, failures = 0;
  logic a, b, c, p, q, r;
  bit seen [int];

  toffoli_gate dut (.a(a), .b(b), .c(c), .p(p), .q(q), .r(r));

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 8; v++) begin
      {a, b, c} = v[3-1:0];
      #1;
      checks++;
      if ({p, q, r} !== {a, b, c ^ (a & b)}) begin
        failures++;
        $display("FAIL v=%0d got %b exp %b", v, {p, q, r}, {a, b, c ^ (a & b)});
      end
      checks++;
      if (seen.exists(int'({p, q, r}))) begin
        failures++;
        $display("FAIL not one-to-one at v=%0d", v);
      end
      seen[int'({p, q, r})] = 1'b1;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
