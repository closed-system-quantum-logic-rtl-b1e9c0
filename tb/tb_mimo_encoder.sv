// tb_mimo_encoder: encodes the three-stream batch 101 / 001 / 011 (plus
// tails) in parallel and compares each stream with the code words
// 1110001011 / 0000111011 / 0011010111; then random batches on a 5-stream
// instance are compared stream by stream with a shift-register model.
module tb_mimo_encoder;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0, clear = 0, in_valid = 0;
  logic [2:0] bits3;
  logic [4:0] bits5;
  logic v3, v5;
  logic [2:0][1:0] syms3;
  logic [4:0][1:0] syms5;

  mimo_encoder          dut3 (.clk(clk), .rst_n(rst_n), .clear(clear), .in_valid(in_valid),
                              .in_bits(bits3), .out_valid(v3), .out_syms(syms3));
  mimo_encoder #(.S(5)) dut5 (.clk(clk), .rst_n(rst_n), .clear(clear), .in_valid(in_valid),
                              .in_bits(bits5), .out_valid(v5), .out_syms(syms5));

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [2:0] m[3] = '{3'b101, 3'b001, 3'b011};     // first bit is the MSB
    logic [9:0] c[3] = '{10'b1110001011, 10'b0000111011, 10'b0011010111};
    logic [9:0] got[3];
    logic [1:0] sr[5];
    repeat (2) @(posedge clk);
    rst_n = 1;
    @(negedge clk);
    for (int t = 0; t < 5; t++) begin
      in_valid = 1;
      clear    = (t == 0);
      for (int i = 0; i < 3; i++) bits3[i] = (t < 3) ? m[i][2-t] : 1'b0;
      bits5 = '0;
      @(posedge clk);
      #1;
      checks++;
      if (!v3) failures++;
      for (int i = 0; i < 3; i++) got[i][9-2*t -: 2] = syms3[i];
      @(negedge clk);
    end
    in_valid = 0;
    for (int i = 0; i < 3; i++) begin
      checks++;
      if (got[i] !== c[i]) begin
        failures++;
        $display("FAIL stream %0d got %b exp %b", i + 1, got[i], c[i]);
      end
    end
    // random batches, 5 streams, model: state {s1, s2}
    for (int n = 0; n < 20; n++) begin
      @(negedge clk);
      for (int i = 0; i < 5; i++) sr[i] = '0;
      for (int t = 0; t < 12; t++) begin
        in_valid = 1;
        clear    = (t == 0);
        bits5    = (t < 10) ? 5'($urandom) : 5'b0;
        @(posedge clk);
        #1;
        for (int i = 0; i < 5; i++) begin
          checks++;
          if (syms5[i] !== {bits5[i] ^ sr[i][1] ^ sr[i][0], bits5[i] ^ sr[i][0]}) begin
            failures++;
            $display("FAIL random stream %0d t=%0d", i, t);
          end
          sr[i] = {bits5[i], sr[i][1]};
        end
        @(negedge clk);
      end
      in_valid = 0;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
