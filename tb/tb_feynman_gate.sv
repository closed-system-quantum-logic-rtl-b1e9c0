// tb_feynman_gate: exhaustive self-checking testbench for feynman_gate.
//
// Applies every input combination, compares each output with an expression
// of the gate's truth table written here independently of the module, and
// checks that distinct inputs give distinct outputs (the map is one-to-one).
module tb_feynman_gate;
  int checks = 0, failures = 0;
  logic a, b, p, q;
  bit seen [int];

  feynman_gate dut (.a(a), .b(b), .p(p), .q(q));

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 4; v++) begin
      {a, b} = v[2-1:0];
      #1;
      checks++;
      if ({p, q} !== {a, a ^ b}) begin
        failures++;
        $display("FAIL v=%0d got %b exp %b", v, {p, q}, {a, a ^ b});
      end
      checks++;
      if (seen.exists(int'({p, q}))) begin
        failures++;
        $display("FAIL not one-to-one at v=%0d", v);
      end
      seen[int'({p, q})] = 1'b1;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
