// tb_q_half_adder: exhaustive self-checking testbench for q_half_adder.
//
// Applies every input combination, compares each output with an expression
// of the gate's truth table written here independently of the module, and
// checks that distinct inputs give distinct outputs (the map is one-to-one).
module tb_q_half_adder;
  int checks = 0, failures = 0;
  logic a, b, z, p, s, c;
  bit seen [int];

  q_half_adder dut (.a(a), .b(b), .z(z), .p(p), .s(s), .c(c));

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 8; v++) begin
      {a, b, z} = v[3-1:0];
      #1;
      checks++;
      if ({p, s, c} !== {a, 1'(a + b), z ^ 1'((2'(a) + 2'(b)) >> 1)}) begin
        failures++;
        $display("FAIL v=%0d got %b exp %b", v, {p, s, c}, {a, 1'(a + b), z ^ 1'((2'(a) + 2'(b)) >> 1)});
      end
      checks++;
      if (seen.exists(int'({p, s, c}))) begin
        failures++;
        $display("FAIL not one-to-one at v=%0d", v);
      end
      seen[int'({p, s, c})] = 1'b1;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
