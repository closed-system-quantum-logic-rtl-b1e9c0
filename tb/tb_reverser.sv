// tb_reverser: checks the worked batch {1,1,1} -> 101, 001, 011, the full
// three-stream table (derived by hand from the construction rules), and, for
// every batch of 2 to 6 streams, that every message carries its data bit in
// bit 0, that the first auxiliary column is 0 for the first ceil(S/2) rows
// and 1 below, and that all messages differ.
module tb_reverser;
  int checks = 0, failures = 0;
  logic [1:0] d2; logic [1:0][1:0] m2;
  logic [2:0] d3; logic [2:0][2:0] m3;
  logic [3:0] d4; logic [3:0][3:0] m4;
  logic [4:0] d5; logic [4:0][4:0] m5;
  logic [5:0] d6; logic [5:0][5:0] m6;

  reverser #(.S(2)) u2 (.data(d2), .msgs(m2));
  reverser          u3 (.data(d3), .msgs(m3));
  reverser #(.S(4)) u4 (.data(d4), .msgs(m4));
  reverser #(.S(5)) u5 (.data(d5), .msgs(m5));
  reverser #(.S(6)) u6 (.data(d6), .msgs(m6));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic props(input int s, input logic [7:0] d, input logic [7:0] m [8]);
    for (int i = 0; i < s; i++) begin
      checks++;
      if (m[i][0] !== d[i]) begin failures++; $display("FAIL S=%0d data bit row %0d", s, i); end
      checks++;
      if (m[i][1] !== (i >= (s + 1) / 2)) begin failures++; $display("FAIL S=%0d column 1 row %0d", s, i); end
      for (int j = 0; j < i; j++) begin
        checks++;
        if (m[i] == m[j]) begin failures++; $display("FAIL S=%0d rows %0d,%0d equal d=%b", s, j, i, d); end
      end
    end
  endtask

  initial begin
    // rows {m1, m2, m3} for data {d1, d2, d3}; index = {d3, d2, d1}
    logic [8:0] tab [8] = '{9'b100_000_010, 9'b101_100_010, 9'b100_101_010, 9'b101_001_010,
                            9'b100_000_011, 9'b101_100_011, 9'b100_101_011, 9'b101_001_011};
    logic [7:0] mm [8];
    d3 = 3'b111;
    #1;
    checks++;
    if (m3[0] !== 3'b101 || m3[1] !== 3'b001 || m3[2] !== 3'b011) begin
      failures++;
      $display("FAIL batch 111 -> %b %b %b", m3[0], m3[1], m3[2]);
    end
    for (int v = 0; v < 8; v++) begin
      d3 = 3'(v);
      #1;
      checks++;
      if ({m3[0], m3[1], m3[2]} !== tab[v]) begin
        failures++;
        $display("FAIL data %b -> %b %b %b", d3, m3[0], m3[1], m3[2]);
      end
    end
    for (int v = 0; v < 64; v++) begin
      d2 = 2'(v); d3 = 3'(v); d4 = 4'(v); d5 = 5'(v); d6 = 6'(v);
      #1;
      if (v < 4)  begin for (int i = 0; i < 8; i++) mm[i] = (i < 2) ? 8'(m2[i]) : '0; props(2, 8'(d2), mm); end
      if (v < 8)  begin for (int i = 0; i < 8; i++) mm[i] = (i < 3) ? 8'(m3[i]) : '0; props(3, 8'(d3), mm); end
      if (v < 16) begin for (int i = 0; i < 8; i++) mm[i] = (i < 4) ? 8'(m4[i]) : '0; props(4, 8'(d4), mm); end
      if (v < 32) begin for (int i = 0; i < 8; i++) mm[i] = (i < 5) ? 8'(m5[i]) : '0; props(5, 8'(d5), mm); end
      for (int i = 0; i < 8; i++) mm[i] = (i < 6) ? 8'(m6[i]) : '0;
      props(6, 8'(d6), mm);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
