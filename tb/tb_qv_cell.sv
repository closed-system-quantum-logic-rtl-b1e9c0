// tb_qv_cell: drives the trellis node with every received symbol, every pair
// of branch labels and every pair of 2-bit predecessor metrics (the basic
// node), plus random cases on a 5-bit instance. The expected survivor is
// computed with integer arithmetic: the first path wins only when its sum is
// strictly smaller.
module tb_qv_cell;
  int checks = 0, failures = 0, ties = 0;
  logic [1:0] a, b0, b1, pm0, pm1;
  logic [2:0] pmo;
  logic o1, tie;
  logic [4:0] qm0, qm1;
  logic [5:0] qmo;
  logic qo1, qtie;

  qv_cell          dut  (.a(a), .b0(b0), .b1(b1), .pm0(pm0), .pm1(pm1),
                         .pm_o(pmo), .o1(o1), .tie(tie));
  qv_cell #(.W(5)) dut5 (.a(a), .b0(b0), .b1(b1), .pm0(qm0), .pm1(qm1),
                         .pm_o(qmo), .o1(qo1), .tie(qtie));

  function automatic int hd(logic [1:0] p, logic [1:0] q);
    return int'(p[1] != q[1]) + int'(p[0] != q[0]);
  endfunction

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int x, y;
    for (int v = 0; v < 1024; v++) begin
      {a, b0, b1, pm0, pm1} = v[9:0];
      qm0 = 5'($urandom);
      qm1 = 5'($urandom);
      #1;
      x = pm0 + hd(a, b0);
      y = pm1 + hd(a, b1);
      checks++;
      if (o1 !== (x < y) || pmo !== 3'((x < y) ? x : y) || tie !== (x == y)) begin
        failures++;
        $display("FAIL a=%b b0=%b b1=%b pm0=%0d pm1=%0d -> %0d o1=%b", a, b0, b1, pm0, pm1, pmo, o1);
      end
      if (tie) ties++;
      x = qm0 + hd(a, b0);
      y = qm1 + hd(a, b1);
      checks++;
      if (qo1 !== (x < y) || qmo !== 6'((x < y) ? x : y) || qtie !== (x == y)) begin
        failures++;
        $display("FAIL5 pm0=%0d pm1=%0d -> %0d", qm0, qm1, qmo);
      end
    end
    checks++;
    if (ties == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
