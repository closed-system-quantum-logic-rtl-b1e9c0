// tb_conv_encoder: drives the K = 3, rate-1/2 encoder with the worked
// messages 10011, 11011, 00011, 01001 and 101 (each followed by two zero tail
// bits) and compares the symbol streams with the known code words, then
// encodes random messages and compares with a polynomial-multiplication
// model written here. It also checks the one-clock latency of out_valid.
module tb_conv_encoder;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0, clear = 0, in_valid = 0, in_bit = 0;
  logic out_valid;
  logic [1:0] out_sym;

  conv_encoder dut (.clk(clk), .rst_n(rst_n), .clear(clear), .in_valid(in_valid),
                    .in_bit(in_bit), .out_valid(out_valid), .out_sym(out_sym));

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // c_k(D) = g_k(D) m(D) over GF(2), bit j of a vector = coefficient of D^j
  function automatic logic [63:0] polymul(logic [63:0] m, logic [2:0] g, int len);
    logic [63:0] r = '0;
    for (int i = 0; i < len; i++)
      for (int j = 0; j < 3; j++)
        if (m[i] && g[j]) r[i+j] ^= 1'b1;
    return r;
  endfunction

  // send msg (bit j = j-th message bit) plus tail, return the symbol stream
  // as a string of '0'/'1', path #1 first in each pair
  task automatic run(input logic [31:0] msg, input int len, output string got);
    got = "";
    @(negedge clk);
    for (int j = 0; j < len + 2; j++) begin
      in_valid = 1;
      clear    = (j == 0);
      in_bit   = (j < len) ? msg[j] : 1'b0;
      @(posedge clk);
      #1;
      checks++;
      if (!out_valid) begin
        failures++;
        $display("FAIL out_valid low one clock after input %0d", j);
      end
      got = {got, out_sym[1] ? "1" : "0", out_sym[0] ? "1" : "0"};
      @(negedge clk);
    end
    in_valid = 0;
    clear    = 0;
    @(posedge clk);
    #1;
    checks++;
    if (out_valid) failures++;
  endtask

  function automatic logic [31:0] str2msg(string s);
    logic [31:0] m = '0;
    for (int i = 0; i < s.len(); i++) m[i] = (s[i] == "1");
    return m;
  endfunction

  initial begin
    string msgs[5]  = '{"10011", "11011", "00011", "01001", "101"};
    string codes[5] = '{"11101111010111", "11010100010111", "00000011010111",
                        "00111011111011", "1110001011"};
    string got, exp;
    logic [63:0] c1, c2;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int k = 0; k < 5; k++) begin
      run(str2msg(msgs[k]), msgs[k].len(), got);
      checks++;
      if (got != codes[k]) begin
        failures++;
        $display("FAIL msg %s: got %s exp %s", msgs[k], got, codes[k]);
      end
    end
    for (int n = 0; n < 50; n++) begin
      logic [31:0] m;
      int len;
      m   = $urandom;
      len = 1 + $urandom_range(0, 20);
      for (int i = len; i < 32; i++) m[i] = 1'b0;
      run(m, len, got);
      c1 = polymul(64'(m), 3'b111, len);
      c2 = polymul(64'(m), 3'b101, len);
      exp = "";
      for (int j = 0; j < len + 2; j++) exp = {exp, c1[j] ? "1" : "0", c2[j] ? "1" : "0"};
      checks++;
      if (got != exp) begin
        failures++;
        $display("FAIL random len %0d: got %s exp %s", len, got, exp);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
