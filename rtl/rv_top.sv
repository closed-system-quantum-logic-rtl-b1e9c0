// rv_top: reversible multiple-stream Viterbi coding system.
//
// Send side: a batch of S data bits (one per stream) is made reversible by
// the reverser, giving S distinct S-bit messages. The S messages are fed,
// first bit first, into the S parallel convolutional encoders
// (mimo_encoder), followed by K-1 zero tail bits, so each stream sends
// S+K-1 symbols. tx_first / tx_last frame the symbols on tx_syms.
// Receive side: symbols from the channel (rx_*) enter S Viterbi decoders in
// lock step; the frames are terminated, so each decoder releases the path
// ending in the all-zero state. The first S decoded bits of each stream
// form its message. A decoder whose path metric exceeds CORR_T (more errors
// than the code is meant to correct) marks its stream as suspect, and the
// rev_corrector checks the batch against the reversible mapping and repairs
// a single suspect stream from the others.
//
// Timing: after tx_start (accepted when tx_busy is 0) the first symbol
// appears two clocks later and one symbol per clock follows. On the receive
// side out_valid rises two clocks after the symbol flagged rx_last. The
// channel between tx_syms and rx_syms is not part of the design.
module rv_top
  import viterbi_pkg::*;
#(
  parameter  int unsigned S       = 3,     // parallel streams (and message length)
  parameter  int unsigned MAX_SYM = 15,    // decoding window, at least S+K-1
  parameter  int unsigned CORR_T  = 2,     // largest metric a decoder trusts
  localparam int unsigned PM_W    = $clog2(4 * MAX_SYM + 2)
) (
  input  logic                 clk,
  input  logic                 rst_n,           // asynchronous, active low
  // send side
  input  logic                 tx_start,
  input  logic [S-1:0]         tx_data,         // bit i: data bit of stream i
  output logic                 tx_busy,
  output logic                 tx_valid,
  output logic                 tx_first,
  output logic                 tx_last,
  output sym_t [S-1:0]         tx_syms,
  // receive side
  input  logic                 rx_valid,
  input  logic                 rx_first,
  input  logic                 rx_last,
  input  sym_t [S-1:0]         rx_syms,
  output logic                 out_valid,
  output logic [S-1:0]         out_data,        // corrected batch bits
  output logic [S-1:0][S-1:0]  out_msgs,        // corrected messages
  output logic [S-1:0][PM_W-1:0] out_metrics,   // path metric of each stream
  output logic [S-1:0]         out_suspect,     // streams the decoders distrusted
  output logic                 err_detected,
  output logic                 err_corrected,
  output logic                 err_uncorrectable
);
  localparam int unsigned FRAME = S + M;          // symbols per stream
  localparam int unsigned TW    = $clog2(FRAME + 1);
  localparam int unsigned LW    = $clog2(MAX_SYM + 1);

  // ---------------- send side ----------------
  logic [S-1:0][S-1:0] tx_msgs, msgs_q;
  logic [TW-1:0]       t_q;
  logic                feed, feed_first, feed_last, first_d, last_d;
  logic [S-1:0]        feed_bits;

  reverser #(.S(S)) u_rev (.data(tx_data), .msgs(tx_msgs));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      tx_busy <= 1'b0;
      t_q     <= '0;
      msgs_q  <= '0;
    end else if (!tx_busy) begin
      if (tx_start) begin
        tx_busy <= 1'b1;
        t_q     <= '0;
        msgs_q  <= tx_msgs;
      end
    end else begin
      t_q <= t_q + 1'b1;
      if (t_q == TW'(FRAME - 1)) tx_busy <= 1'b0;
    end
  end

  assign feed       = tx_busy;
  assign feed_first = tx_busy && (t_q == '0);
  assign feed_last  = tx_busy && (t_q == TW'(FRAME - 1));
  // message bits first bit first; the shift runs out into the zero tail
  always_comb begin
    logic [S-1:0] sh;
    for (int i = 0; i < S; i++) begin
      sh           = msgs_q[i] << t_q;
      feed_bits[i] = sh[S-1];
    end
  end

  mimo_encoder #(.S(S)) u_enc (
    .clk(clk), .rst_n(rst_n), .clear(feed_first), .in_valid(feed),
    .in_bits(feed_bits), .out_valid(tx_valid), .out_syms(tx_syms));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      first_d <= 1'b0;
      last_d  <= 1'b0;
    end else begin
      first_d <= feed_first;
      last_d  <= feed_last;
    end
  end
  assign tx_first = first_d;
  assign tx_last  = last_d;

  // ---------------- receive side ----------------
  logic [S-1:0]               dec_valid;
  logic [S-1:0][MAX_SYM-1:0]  dec_bits;
  logic [S-1:0][LW-1:0]       dec_len;
  logic [S-1:0][PM_W-1:0]     dec_metric;
  logic [S-1:0][S-1:0]        rx_msgs, cor_msgs;
  logic [S-1:0]               hint, cor_data, mismatch;
  logic                       det, cor, unc;

  for (genvar i = 0; i < S; i++) begin : g_dec
    viterbi_decoder #(.MAX_SYM(MAX_SYM)) u_dec (
      .clk(clk), .rst_n(rst_n), .in_valid(rx_valid), .in_first(rx_first),
      .in_last(rx_last), .terminated(1'b1), .in_sym(rx_syms[i]),
      .out_valid(dec_valid[i]), .out_bits(dec_bits[i]), .out_len(dec_len[i]),
      .out_metric(dec_metric[i]), .tie_count());
    // level j carries message bit S-1-j
    for (genvar j = 0; j < S; j++) begin : g_bit
      assign rx_msgs[i][S-1-j] = dec_bits[i][j];
    end
    assign hint[i] = dec_metric[i] > PM_W'(CORR_T);
  end

  rev_corrector #(.S(S)) u_cor (
    .rx_msgs(rx_msgs), .hint(hint), .msgs_o(cor_msgs), .data_o(cor_data),
    .mismatch(mismatch), .detected(det), .corrected(cor), .uncorrectable(unc));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_valid         <= 1'b0;
      out_data          <= '0;
      out_msgs          <= '0;
      out_metrics       <= '0;
      out_suspect       <= '0;
      err_detected      <= 1'b0;
      err_corrected     <= 1'b0;
      err_uncorrectable <= 1'b0;
    end else begin
      out_valid <= dec_valid[0];
      if (dec_valid[0]) begin
        out_data          <= cor_data;
        out_msgs          <= cor_msgs;
        out_metrics       <= dec_metric;
        out_suspect       <= hint | mismatch;
        err_detected      <= det;
        err_corrected     <= cor;
        err_uncorrectable <= unc;
      end
    end
  end

  initial assert (MAX_SYM >= FRAME) else $error("MAX_SYM must hold S+K-1 symbols");
endmodule
