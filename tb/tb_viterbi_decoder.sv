// tb_viterbi_decoder: checks the Viterbi decoder at its default 15-symbol
// window.
//  - Worked examples: 0100010000 decodes to 000 (+ tail), 0110101011 to 101,
//    the three received streams 1111001001 / 0100101011 / 0010011111 to
//    101 / 001 / 011, and the triple-error 1100010000 gives the wrong 100
//    (the correct path is lost), all with metric 2.
//  - Random terminated frames with up to three bit errors and random
//    unterminated 15-symbol frames (best-state decision) are compared with a
//    behavioural Viterbi model written here with integer metrics; frames are
//    sent back to back, and every frame with at most one error must return
//    the sent message.
//  - out_valid must rise exactly one clock after the last symbol, and
//    tie_count must have counted equal-metric comparisons.
module tb_viterbi_decoder;
  localparam int MAXS = 15;
  int checks = 0, failures = 0, exact = 0;
  logic clk = 0, rst_n = 0;
  logic in_valid = 0, in_first = 0, in_last = 0, terminated = 1;
  logic [1:0] in_sym = '0;
  logic out_valid;
  logic [MAXS-1:0] out_bits;
  logic [3:0] out_len;
  logic [5:0] out_metric;
  logic [15:0] tie_count;

  viterbi_decoder dut (.clk(clk), .rst_n(rst_n), .in_valid(in_valid), .in_first(in_first),
                       .in_last(in_last), .terminated(terminated), .in_sym(in_sym),
                       .out_valid(out_valid), .out_bits(out_bits), .out_len(out_len),
                       .out_metric(out_metric), .tie_count(tie_count));

  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // behavioural model: state = {newest, oldest}; ties go to the predecessor
  // whose oldest bit is 1
  task automatic ref_decode(input logic [1:0] syms [MAXS], input int n, input bit term,
                            output logic [MAXS-1:0] bits, output int metric);
    int pm [4], npm [4];
    logic [MAXS-1:0] pa [4], npa [4];
    int best;
    for (int s = 0; s < 4; s++) begin pm[s] = (s == 0) ? 0 : 1000; pa[s] = '0; end
    for (int j = 0; j < n; j++) begin
      for (int ns = 0; ns < 4; ns++) begin
        int u, s1, c[2];
        u  = ns >> 1;
        s1 = ns & 1;
        for (int b = 0; b < 2; b++) begin
          int o1, o2;
          o1 = u ^ s1 ^ b;
          o2 = u ^ b;
          c[b] = pm[s1*2 + b] + int'(o1 != syms[j][1]) + int'(o2 != syms[j][0]);
        end
        if (c[0] < c[1]) begin npm[ns] = c[0]; npa[ns] = pa[s1*2]; end
        else             begin npm[ns] = c[1]; npa[ns] = pa[s1*2 + 1]; end
        npa[ns][j] = 1'(u);
      end
      pm = npm;
      pa = npa;
    end
    best = 0;
    if (!term) for (int s = 1; s < 4; s++) if (pm[s] < pm[best]) best = s;
    bits   = pa[best];
    metric = pm[best];
  endtask

  task automatic encode(input logic [MAXS-1:0] m, input int n, output logic [1:0] syms [MAXS]);
    logic s1 = 0, s2 = 0;
    for (int j = 0; j < MAXS; j++) syms[j] = '0;
    for (int j = 0; j < n; j++) begin
      syms[j] = {m[j] ^ s1 ^ s2, m[j] ^ s2};
      s2 = s1;
      s1 = m[j];
    end
  endtask

  // drive one frame; 'gap' idle cycles follow it
  task automatic send(input logic [1:0] syms [MAXS], input int n, input bit term, input int gap);
    for (int j = 0; j < n; j++) begin
      @(negedge clk);
      in_valid   = 1;
      in_first   = (j == 0);
      in_last    = (j == n - 1);
      terminated = term;
      in_sym     = syms[j];
    end
    @(negedge clk);
    in_valid = 0;
    in_first = 0;
    in_last  = 0;
    repeat (gap) @(negedge clk);
  endtask

  // expected results, queued in frame order
  logic [MAXS-1:0] q_bits [$];
  int              q_met  [$], q_len [$];

  task automatic frame(input logic [1:0] syms [MAXS], input int n, input bit term, input int gap);
    logic [MAXS-1:0] b;
    int mt;
    ref_decode(syms, n, term, b, mt);
    for (int j = n; j < MAXS; j++) b[j] = 1'b0;
    q_bits.push_back(b);
    q_met.push_back(mt);
    q_len.push_back(n);
    send(syms, n, term, gap);
  endtask

  // result checker with the latency check
  int last_edge = -10, cyc = 0;
  always @(posedge clk) begin
    cyc++;
    if (in_valid && in_last) last_edge = cyc;
    if (out_valid) begin
      logic [MAXS-1:0] eb;
      eb = q_bits.pop_front();
      checks++;
      if (out_bits !== eb || int'(out_metric) != q_met.pop_front() ||
          int'(out_len) != q_len.pop_front()) begin
        failures++;
        $display("FAIL frame: bits %b exp %b metric %0d", out_bits, eb, out_metric);
      end
    end
  end
  always @(posedge clk) begin
    if (rst_n) begin
      checks++;
      if (out_valid !== (last_edge == cyc - 1)) begin
        failures++;
        $display("FAIL out_valid timing at cycle %0d", cyc);
      end
    end
  end

  function automatic void from_str(string s, output logic [1:0] syms [MAXS]);
    for (int j = 0; j < MAXS; j++) syms[j] = '0;
    for (int j = 0; j < s.len() / 2; j++) syms[j] = {s[2*j] == "1", s[2*j+1] == "1"};
  endfunction

  initial begin
    string rx[6]  = '{"0100010000", "0110101011", "1111001001", "0100101011",
                      "0010011111", "1100010000"};
    logic [4:0] dec[6] = '{5'b00000, 5'b00101, 5'b00101, 5'b00100, 5'b00110, 5'b00001};
    logic [1:0] syms [MAXS];
    logic [MAXS-1:0] m;
    repeat (3) @(negedge clk);
    rst_n = 1;
    // worked examples, checked against the literal answers
    for (int k = 0; k < 6; k++) begin
      from_str(rx[k], syms);
      frame(syms, 5, 1'b1, 2);
      checks++;
      if (out_bits[4:0] !== dec[k] || out_metric != 2) begin
        failures++;
        $display("FAIL example %s: %b metric %0d", rx[k], out_bits[4:0], out_metric);
      end
    end
    // random frames, back to back
    for (int n = 0; n < 400; n++) begin
      int len, ne;
      bit term;
      logic [1:0] tx [MAXS];
      term = (n % 4 != 3);
      len  = term ? $urandom_range(3, MAXS) : MAXS;
      m    = MAXS'($urandom);
      for (int j = (term ? len - 2 : len); j < MAXS; j++) m[j] = 1'b0;
      encode(m, len, tx);
      syms = tx;
      ne = $urandom_range(0, 3);
      for (int e = 0; e < ne; e++) begin
        int p;
        p = $urandom_range(0, 2 * len - 1);
        syms[p / 2][1 - p % 2] ^= 1'b1;
      end
      frame(syms, len, term, (n % 3 == 0) ? 0 : 1);
      @(negedge clk);
      if (term && ne <= 1) begin
        // one error is always corrected (free distance 5)
        checks++;
        if (q_bits.size() == 0 && out_bits[MAXS-1:0] != m) begin
          failures++;
          $display("FAIL single-error frame not corrected");
        end else exact++;
      end
    end
    repeat (5) @(negedge clk);
    checks++;
    if (tie_count == 0) begin failures++; $display("FAIL no tie seen"); end
    checks++;
    if (q_bits.size() != 0) begin failures++; $display("FAIL %0d results missing", q_bits.size()); end
    $display("ties seen: %0d, single-error frames corrected: %0d", tie_count, exact);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
