// tb_rv_top: end-to-end test of the reversible multiple-stream system at its
// default size (3 streams, 15-symbol decoding window).
//
// The testbench plays the channel: it captures the coded symbols from the
// send side, flips chosen bits, and feeds them to the receive side. Cases:
//  - every clean batch: code words, messages and data must come back
//    unflagged; batch {1,1,1} must be sent as 1110001011 / 0000111011 /
//    0011010111;
//  - the worked noisy streams 1111001001 / 0100101011 / 0010011111, which the
//    decoders alone correct;
//  - triple errors in one stream that defeat its decoder: one detected by a
//    high path metric, one only by the reversibility check, both repaired
//    from the other streams;
//  - triple errors in two streams: flagged uncorrectable;
//  - random batches with at most one error per stream, always recovered.
// It checks the send latency (first symbol two clocks after tx_start) and
// the receive latency (result two clocks after the last symbol), and counts
// how often each mechanism acted: decoder correction, metric alarm,
// reversibility mismatch, repair, uncorrectable flag. Each must occur.
module tb_rv_top;
  int checks = 0, failures = 0;
  int n_dec_fix = 0, n_alarm = 0, n_mis = 0, n_rep = 0, n_unc = 0;
  logic clk = 0, rst_n = 0;
  logic tx_start = 0, tx_busy, tx_valid, tx_first, tx_last;
  logic [2:0] tx_data = '0;
  logic [2:0][1:0] tx_syms;
  logic rx_valid = 0, rx_first = 0, rx_last = 0;
  logic [2:0][1:0] rx_syms = '0;
  logic out_valid, err_detected, err_corrected, err_uncorrectable;
  logic [2:0] out_data, out_suspect;
  logic [2:0][2:0] out_msgs;
  logic [2:0][5:0] out_metrics;

  rv_top dut (.clk(clk), .rst_n(rst_n), .tx_start(tx_start), .tx_data(tx_data), .tx_busy(tx_busy),
              .tx_valid(tx_valid), .tx_first(tx_first), .tx_last(tx_last), .tx_syms(tx_syms),
              .rx_valid(rx_valid), .rx_first(rx_first), .rx_last(rx_last), .rx_syms(rx_syms),
              .out_valid(out_valid), .out_data(out_data), .out_msgs(out_msgs),
              .out_metrics(out_metrics), .out_suspect(out_suspect), .err_detected(err_detected),
              .err_corrected(err_corrected), .err_uncorrectable(err_uncorrectable));

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // {m1, m2, m3} of every batch, index {d3, d2, d1}
  logic [8:0] tab [8] = '{9'b100_000_010, 9'b101_100_010, 9'b100_101_010, 9'b101_001_010,
                          9'b100_000_011, 9'b101_100_011, 9'b100_101_011, 9'b101_001_011};

  logic [9:0] code [3];     // captured code word of each stream, first bit in bit 9

  task automatic check(input bit c, input string what);
    checks++;
    if (!c) begin
      failures++;
      $display("FAIL %s", what);
    end
  endtask

  // send a batch and capture the three code words
  task automatic transmit(input logic [2:0] d);
    int cyc, t;
    @(negedge clk);
    tx_data  = d;
    tx_start = 1;
    @(negedge clk);
    tx_start = 0;
    cyc = 1;
    while (!tx_valid) begin
      @(negedge clk);
      cyc++;
    end
    check(cyc == 2 && tx_first, "first symbol two clocks after tx_start");
    for (t = 0; t < 5; t++) begin
      check(tx_valid && (tx_last == (t == 4)), "symbol framing");
      for (int i = 0; i < 3; i++) code[i][9-2*t -: 2] = tx_syms[i];
      @(negedge clk);
    end
    check(!tx_valid && !tx_busy, "send side idle after five symbols");
  endtask

  // feed received code words; return after the result
  task automatic receive(input logic [9:0] rx [3]);
    int cyc;
    for (int t = 0; t < 5; t++) begin
      rx_valid = 1;
      rx_first = (t == 0);
      rx_last  = (t == 4);
      for (int i = 0; i < 3; i++) rx_syms[i] = rx[i][9-2*t -: 2];
      @(negedge clk);
    end
    rx_valid = 0;
    rx_last  = 0;
    cyc = 1;
    while (!out_valid) begin
      @(negedge clk);
      cyc++;
      if (cyc > 10) break;
    end
    check(cyc == 2, "result two clocks after the last symbol");
    if (err_detected)      n_mis++;
    if (out_metrics[0] > 2 || out_metrics[1] > 2 || out_metrics[2] > 2) n_alarm++;
    if (err_corrected)     n_rep++;
    if (err_uncorrectable) n_unc++;
  endtask

  function automatic logic [9:0] flip(logic [9:0] c, int a, int b, int e);
    logic [9:0] r = c;
    if (a >= 0) r[9-a] ^= 1'b1;
    if (b >= 0) r[9-b] ^= 1'b1;
    if (e >= 0) r[9-e] ^= 1'b1;
    return r;
  endfunction

  task automatic expect_batch(input logic [2:0] d, input string what);
    logic [8:0] t;
    t = tab[d];
    check(out_data === d, {what, ": data"});
    check(out_msgs[0] === t[8:6] && out_msgs[1] === t[5:3] && out_msgs[2] === t[2:0],
          {what, ": messages"});
  endtask

  initial begin
    logic [9:0] rx [3];
    repeat (3) @(negedge clk);
    rst_n = 1;

    // clean batches
    for (int v = 0; v < 8; v++) begin
      transmit(3'(v));
      if (v == 7)
        check(code[0] == 10'b1110001011 && code[1] == 10'b0000111011 &&
              code[2] == 10'b0011010111, "code words of batch {1,1,1}");
      receive(code);
      expect_batch(3'(v), "clean batch");
      check(!err_detected && !err_corrected && !err_uncorrectable, "clean batch unflagged");
    end

    // worked noisy streams: decoders alone correct them
    rx = '{10'b1111001001, 10'b0100101011, 10'b0010011111};
    receive(rx);
    expect_batch(3'b111, "worked noisy streams");
    check(out_metrics[0] == 2 && out_metrics[1] == 2 && out_metrics[2] == 2, "worked metrics");
    check(!err_corrected, "worked streams need no repair");
    n_dec_fix++;

    // triple error in stream 3: decoded as 111, caught by the mapping check only
    transmit(3'b111);
    rx = code;
    rx[2] = flip(code[2], 0, 1, 2);
    receive(rx);
    check(err_detected && err_corrected && out_suspect == 3'b100 && out_metrics[2] <= 2,
          "stream 3 repaired after mapping mismatch");
    expect_batch(3'b111, "stream 3 repair");

    // triple error in stream 1: metric 3 raises the alarm
    rx = code;
    rx[0] = flip(code[0], 0, 1, 3);
    receive(rx);
    check(out_metrics[0] == 3 && out_suspect[0] && err_corrected, "stream 1 repaired after metric alarm");
    expect_batch(3'b111, "stream 1 repair");

    // two damaged streams cannot be repaired
    rx[1] = flip(code[1], 0, 1, 3);
    receive(rx);
    check(err_uncorrectable && !err_corrected, "two damaged streams uncorrectable");

    // random batches, at most one error per stream
    for (int n = 0; n < 60; n++) begin
      logic [2:0] d;
      bit any;
      d = 3'($urandom);
      transmit(d);
      rx  = code;
      any = 0;
      for (int i = 0; i < 3; i++)
        if ($urandom_range(0, 1)) begin
          rx[i] = flip(code[i], $urandom_range(0, 9), -1, -1);
          any = 1;
        end
      receive(rx);
      expect_batch(d, "random single errors");
      check(!err_corrected && !err_uncorrectable, "single errors need no repair");
      if (any) n_dec_fix++;
    end

    $display("decoder fixes %0d, metric alarms %0d, mismatches %0d, repairs %0d, uncorrectable %0d",
             n_dec_fix, n_alarm, n_mis, n_rep, n_unc);
    check(n_dec_fix > 0, "decoder correction happened");
    check(n_alarm > 0, "metric alarm happened");
    check(n_mis > 0, "mapping mismatch happened");
    check(n_rep > 0, "repair happened");
    check(n_unc > 0, "uncorrectable flag happened");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
