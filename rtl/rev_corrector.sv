// rev_corrector: checks a decoded batch against the reversible mapping and
// repairs one stream from the others.
//
// The batch was built by the reverser, so every message is a known function
// of the column of data bits (bit 0 of every message). The checker runs the
// decoded data column through a reverser and compares each decoded message
// with the regenerated one (N-bit reversible equality comparators); rows
// that differ are flagged in 'mismatch' and raise 'detected'.
// A stream is suspect when the decoder distrusts it ('hint') or it
// mismatches. With exactly one suspect stream k, both values of its data bit
// are tried: each candidate column is run through a reverser, and a
// candidate is acceptable only if it regenerates every other (trusted)
// message exactly. Of two acceptable candidates the one whose message k is
// closer in Hamming distance to the received message k wins, and on equal
// distance the received data bit is kept. Message k is then replaced by the
// regenerated one ('corrected'). No acceptable candidate, or more than one
// suspect, gives 'uncorrectable' and the batch passes unchanged.
// The candidate search and its tie rules are this design's choices.
// Purely combinational.
module rev_corrector #(
  parameter int unsigned S = 3    // streams in a batch
) (
  input  logic [S-1:0][S-1:0] rx_msgs,   // decoded message of each stream
  input  logic [S-1:0]        hint,      // streams the decoders distrust
  output logic [S-1:0][S-1:0] msgs_o,    // corrected messages
  output logic [S-1:0]        data_o,    // corrected data bits (bit 0 of each)
  output logic [S-1:0]        mismatch,  // rows inconsistent with the mapping
  output logic                detected,
  output logic                corrected,
  output logic                uncorrectable
);
  logic [S-1:0]        d_rx, d0, d1, match, eq0, eq1, suspect;
  logic [S-1:0][S-1:0] exp_m, gen0, gen1;
  logic [$clog2(S+1)-1:0] k;
  logic                   one_suspect;

  always_comb
    for (int i = 0; i < S; i++) d_rx[i] = rx_msgs[i][0];

  // consistency check
  reverser #(.S(S)) u_chk (.data(d_rx), .msgs(exp_m));
  for (genvar i = 0; i < S; i++) begin : g_chk
    q_eq_n #(.N(S)) u_eq  (.x(rx_msgs[i]), .y(exp_m[i]), .eq(match[i]));
    q_eq_n #(.N(S)) u_eq0 (.x(rx_msgs[i]), .y(gen0[i]),  .eq(eq0[i]));
    q_eq_n #(.N(S)) u_eq1 (.x(rx_msgs[i]), .y(gen1[i]),  .eq(eq1[i]));
  end
  assign mismatch = ~match;
  assign detected = |mismatch;
  assign suspect  = hint | mismatch;

  // the single suspect stream, if there is exactly one
  always_comb begin
    k = '0;
    for (int i = 0; i < S; i++) if (suspect[i]) k = ($bits(k))'(i);
  end
  assign one_suspect = (suspect != '0) && ((suspect & (suspect - 1'b1)) == '0);

  // the two candidate columns
  always_comb begin
    d0 = d_rx;
    d1 = d_rx;
    d0[k] = 1'b0;
    d1[k] = 1'b1;
  end
  reverser #(.S(S)) u_c0 (.data(d0), .msgs(gen0));
  reverser #(.S(S)) u_c1 (.data(d1), .msgs(gen1));

  always_comb begin
    logic ok0, ok1, pick1;
    int unsigned dist0, dist1;
    ok0 = 1'b1;
    ok1 = 1'b1;
    for (int j = 0; j < S; j++) begin
      if (j != int'(k)) begin
        ok0 &= eq0[j];
        ok1 &= eq1[j];
      end
    end
    dist0 = $countones(gen0[k] ^ rx_msgs[k]);
    dist1 = $countones(gen1[k] ^ rx_msgs[k]);
    if (ok0 && ok1) pick1 = (dist1 < dist0) || ((dist1 == dist0) && d_rx[k]);
    else            pick1 = ok1;

    msgs_o        = rx_msgs;
    corrected     = 1'b0;
    uncorrectable = 1'b0;
    if (suspect != '0) begin
      if (one_suspect && (ok0 || ok1)) begin
        msgs_o[k] = pick1 ? gen1[k] : gen0[k];
        corrected = 1'b1;
      end else begin
        uncorrectable = 1'b1;
      end
    end
    for (int i = 0; i < S; i++) data_o[i] = msgs_o[i][0];
  end
endmodule
