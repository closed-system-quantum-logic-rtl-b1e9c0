// tb_fredkin_gate: exhaustive self-checking testbench for fredkin_gate.
//
// Applies every input combination, compares each output with an expression
// of the gate's truth table written here independently of the module, and
// checks that distinct inputs give distinct outputs (the map is one-to-one).
module tb_fredkin_gate;
  int checks = 0, failures = 0;
  logic c, a, b, p, q, r;
  bit seen [int];

  fredkin_gate dut (.c(c), .a(a), .b(b), .p(p), .q(q), .r(r));

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 8; v++) begin
      {c, a, b} = v[3-1:0];
      #1;
      checks++;
      if ({p, q, r} !== (c ? {c, b, a} : {c, a, b})) begin
        failures++;
        $display("FAIL v=%0d got %b exp %b", v, {p, q, r}, (c ? {c, b, a} : {c, a, b}));
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
