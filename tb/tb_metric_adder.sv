// tb_metric_adder: exhaustive test of the 2-bit-metric adder of the basic
// trellis node and of a 6-bit instance (extra full-adders), against integer
// addition; the result is one bit wider than the metric.
module tb_metric_adder;
  int checks = 0, failures = 0;
  logic [1:0] hd2, hd6, pm2;
  logic [2:0] s2;
  logic [5:0] pm6;
  logic [6:0] s6;

  metric_adder          dut2 (.hd(hd2), .pm(pm2), .sum(s2));
  metric_adder #(.W(6)) dut6 (.hd(hd6), .pm(pm6), .sum(s6));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int h = 0; h < 3; h++) begin
      for (int p = 0; p < 4; p++) begin
        hd2 = 2'(h);
        pm2 = 2'(p);
        #1;
        checks++;
        if (s2 !== 3'(h + p)) begin
          failures++;
          $display("FAIL hd=%0d pm=%0d sum=%0d", h, p, s2);
        end
      end
      for (int p = 0; p < 64; p++) begin
        hd6 = 2'(h);
        pm6 = 6'(p);
        #1;
        checks++;
        if (s6 !== 7'(h + p)) begin
          failures++;
          $display("FAIL6 hd=%0d pm=%0d sum=%0d", h, p, s6);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
