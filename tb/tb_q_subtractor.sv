// tb_q_subtractor: exhaustive self-checking testbench for q_subtractor.
//
// Applies every input combination, compares each output with an expression
// of the gate's truth table written here independently of the module, and
// checks that distinct inputs give distinct outputs (the map is one-to-one).
module tb_q_subtractor;
  int checks = 0, failures = 0;
  logic a, b, z, p, d, bo;
  bit seen [int];

  q_subtractor dut (.a(a), .b(b), .z(z), .p(p), .d(d), .bo(bo));

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
      if ({p, d, bo} !== {a, 1'(a - b), z ^ (a < b)}) begin
        failures++;
        $display("FAIL v=%0d got %b exp %b", v, {p, d, bo}, {a, 1'(a - b), z ^ (a < b)});
      end
      checks++;
      if (seen.exists(int'({p, d, bo}))) begin
        failures++;
        $display("FAIL not one-to-one at v=%0d", v);
      end
      seen[int'({p, d, bo})] = 1'b1;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
