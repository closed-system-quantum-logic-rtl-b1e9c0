// tb_q_full_adder: exhaustive self-checking testbench for q_full_adder.
//
// Applies every input combination, compares each output with an expression
// of the gate's truth table written here independently of the module, and
// checks that distinct inputs give distinct outputs (the map is one-to-one).
module tb_q_full_adder;
  int checks = 0, failures = 0;
  logic a, b, ci, z, p, q, s, co;
  bit seen [int];

  q_full_adder dut (.a(a), .b(b), .ci(ci), .z(z), .p(p), .q(q), .s(s), .co(co));

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 16; v++) begin
      {a, b, ci, z} = v[4-1:0];
      #1;
      checks++;
      if ({p, q, s, co} !== {a, a ^ b, 1'(2'(a) + 2'(b) + 2'(ci)), z ^ ((2'(a) + 2'(b) + 2'(ci)) >= 2)}) begin
        failures++;
        $display("FAIL v=%0d got %b exp %b", v, {p, q, s, co}, {a, a ^ b, 1'(2'(a) + 2'(b) + 2'(ci)), z ^ ((2'(a) + 2'(b) + 2'(ci)) >= 2)});
      end
      checks++;
      if (seen.exists(int'({p, q, s, co}))) begin
        failures++;
        $display("FAIL not one-to-one at v=%0d", v);
      end
      seen[int'({p, q, s, co})] = 1'b1;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
