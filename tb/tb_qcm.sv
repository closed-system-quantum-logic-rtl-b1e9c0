// tb_qcm: exhaustive test of the 3-bit comparator with multiplexing. o1 must
// be 1 only for x < y, the selected value must be x in that case and y
// otherwise (so a tie selects y), max_o must carry the other value, and tie
// must flag x == y.
module tb_qcm;
  int checks = 0, failures = 0, ties = 0;
  logic [2:0] x, y, mn, mx;
  logic o1, tie;

  qcm dut (.x(x), .y(y), .o1(o1), .tie(tie), .min_o(mn), .max_o(mx));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 64; v++) begin
      {x, y} = v[5:0];
      #1;
      checks++;
      if (o1 !== (x < y) || mn !== ((x < y) ? x : y) || mx !== ((x < y) ? y : x) ||
          tie !== (x == y)) begin
        failures++;
        $display("FAIL x=%0d y=%0d o1=%b min=%0d max=%0d tie=%b", x, y, o1, mn, mx, tie);
      end
      if (tie) ties++;
    end
    checks++;
    if (ties != 8) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
