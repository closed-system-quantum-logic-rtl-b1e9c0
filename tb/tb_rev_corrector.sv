// tb_rev_corrector: three-stream test of the reversibility checker and
// corrector. The expected mapping is the hand-derived table of all eight
// three-stream batches, not the reverser module. For every batch, every
// stream, every received value of that stream's message and every hint
// pattern of that stream, the outputs are compared with a model of the
// repair rule: a single suspect stream takes the data bit whose regenerated
// batch matches all other streams, the nearer one if both do, the received
// one on equal distance. Clean batches must pass unflagged, and the worked
// case (101 and 001 correct, third stream's aux bits damaged) must return
// 011.
module tb_rev_corrector;
  int checks = 0, failures = 0, n_cor = 0, n_unc = 0, n_det = 0;
  logic [2:0][2:0] rx, mo;
  logic [2:0] hint, dat, mis;
  logic det, cor, unc;

  rev_corrector dut (.rx_msgs(rx), .hint(hint), .msgs_o(mo), .data_o(dat), .mismatch(mis),
                     .detected(det), .corrected(cor), .uncorrectable(unc));

  // {m1, m2, m3} for data index {d3, d2, d1}
  logic [8:0] tab [8] = '{9'b100_000_010, 9'b101_100_010, 9'b100_101_010, 9'b101_001_010,
                          9'b100_000_011, 9'b101_100_011, 9'b100_101_011, 9'b101_001_011};

  function automatic logic [2:0] row(logic [2:0] d, int i);
    logic [8:0] t;
    t = tab[d];
    return t[8 - 3*i -: 3];
  endfunction

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [2:0] d, emis, esus;
    logic [2:0][2:0] emo;
    logic edet, ecor, eunc;
    for (int v = 0; v < 8; v++) begin
      for (int k = 0; k < 3; k++) begin
        for (int r = 0; r < 8; r++) begin
          for (int h = 0; h < 2; h++) begin
            for (int i = 0; i < 3; i++) rx[i] = row(3'(v), i);
            rx[k] = 3'(r);
            hint  = h ? 3'(1 << k) : 3'b000;
            #1;
            // model
            for (int i = 0; i < 3; i++) d[i] = rx[i][0];
            for (int i = 0; i < 3; i++) emis[i] = (rx[i] != row(d, i));
            esus = emis | hint;
            edet = |emis;
            emo  = rx;
            ecor = 0;
            eunc = 0;
            if (esus != 0) begin
              if ($countones(esus) == 1) begin
                int s, dd[2];
                bit ok[2];
                logic [2:0] dc;
                for (int i = 0; i < 3; i++) if (esus[i]) s = i;
                for (int b = 0; b < 2; b++) begin
                  dc = d;
                  dc[s] = 1'(b);
                  ok[b] = 1;
                  for (int j = 0; j < 3; j++) if (j != s && row(dc, j) != rx[j]) ok[b] = 0;
                  dd[b] = $countones(row(dc, s) ^ rx[s]);
                end
                if (ok[0] || ok[1]) begin
                  int pick;
                  if (ok[0] && ok[1])
                    pick = (dd[1] < dd[0] || (dd[1] == dd[0] && d[s])) ? 1 : 0;
                  else
                    pick = ok[1] ? 1 : 0;
                  dc = d;
                  dc[s] = 1'(pick);
                  emo[s] = row(dc, s);
                  ecor = 1;
                end else eunc = 1;
              end else eunc = 1;
            end
            checks++;
            if (mo !== emo || mis !== emis || det !== edet || cor !== ecor || unc !== eunc ||
                dat !== {mo[2][0], mo[1][0], mo[0][0]}) begin
              failures++;
              $display("FAIL v=%0d k=%0d r=%b h=%0d: out %b %b %b flags %b%b%b", v, k, r, h,
                       mo[0], mo[1], mo[2], det, cor, unc);
            end
            if (cor) n_cor++;
            if (unc) n_unc++;
            if (det) n_det++;
          end
        end
      end
    end
    // worked case: stream 3 sent 011, its two auxiliary bits received wrong
    rx[0] = 3'b101; rx[1] = 3'b001; rx[2] = 3'b101; hint = 3'b100;
    #1;
    checks++;
    if (mo[2] !== 3'b011 || !cor || dat !== 3'b111) begin
      failures++;
      $display("FAIL worked case: %b", mo[2]);
    end
    // a clean batch is left alone
    rx[2] = 3'b011; hint = 3'b000;
    #1;
    checks++;
    if (det || cor || unc || mo[2] !== 3'b011) failures++;
    checks++;
    if (n_cor == 0 || n_unc == 0 || n_det == 0) failures++;
    $display("corrected %0d, uncorrectable %0d, detected %0d", n_cor, n_unc, n_det);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
