// tb_q_comparator: compares every pair of 3-digit numbers (the size of the
// reference network) and random pairs on a 6-digit instance against the
// integer relations <, ==, >.
module tb_q_comparator;
  int checks = 0, failures = 0;
  logic [2:0] x3, y3;
  logic [5:0] x6, y6;
  logic lt3, eq3, gt3, lt6, eq6, gt6;

  q_comparator          dut3 (.x(x3), .y(y3), .lt(lt3), .eq(eq3), .gt(gt3));
  q_comparator #(.N(6)) dut6 (.x(x6), .y(y6), .lt(lt6), .eq(eq6), .gt(gt6));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 64; v++) begin
      {x3, y3} = v[5:0];
      #1;
      checks++;
      if ({lt3, eq3, gt3} !== {x3 < y3, x3 == y3, x3 > y3}) begin
        failures++;
        $display("FAIL x=%0d y=%0d got %b", x3, y3, {lt3, eq3, gt3});
      end
    end
    for (int n = 0; n < 300; n++) begin
      x6 = 6'($urandom);
      y6 = (n % 5 == 0) ? x6 : 6'($urandom);
      #1;
      checks++;
      if ({lt6, eq6, gt6} !== {x6 < y6, x6 == y6, x6 > y6}) begin
        failures++;
        $display("FAIL x=%0d y=%0d got %b", x6, y6, {lt6, eq6, gt6});
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
