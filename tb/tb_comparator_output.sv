// tb_comparator_output: exhaustive self-checking testbench for comparator_output.
//
// Applies every input combination, compares each output with an expression
// of the gate's truth table written here independently of the module, and
// checks that distinct inputs give distinct outputs (the map is one-to-one).
module tb_comparator_output;
  int checks = 0, failures = 0;
  logic g, l, lt, eq, gt;

  comparator_output dut (.g(g), .l(l), .lt(lt), .eq(eq), .gt(gt));

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 4; v++) begin
      {g, l} = v[2-1:0];
      #1;
      checks++;
      if ({lt, eq, gt} !== {l, (g == 0 && l == 0), g}) begin
        failures++;
        $display("FAIL v=%0d got %b exp %b", v, {lt, eq, gt}, {l, (g == 0 && l == 0), g});
      end

    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
