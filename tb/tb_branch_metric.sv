// tb_branch_metric: for every received symbol and branch label the output
// must be the number of differing bits (0, 1 or 2).
module tb_branch_metric;
  int checks = 0, failures = 0;
  logic [1:0] a, b, hd;

  branch_metric dut (.a(a), .b(b), .hd(hd));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 16; v++) begin
      {a, b} = v[3:0];
      #1;
      checks++;
      if (hd !== 2'((a[1] != b[1]) + (a[0] != b[0]))) begin
        failures++;
        $display("FAIL a=%b b=%b hd=%0d", a, b, hd);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
