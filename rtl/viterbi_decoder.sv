// viterbi_decoder: hard-decision Viterbi decoder for the K = 3, rate-1/2 code.
//
// One trellis level is processed per clock. Each of the 2^(K-1) = 4 states
// has a qv_cell (add-compare-select node) fed by the two predecessor states;
// the survivor metrics are held in registers, and the survivor paths are kept
// by register exchange: every state owns a MAX_SYM-bit path register, and the
// winning predecessor's path is copied with the decoded bit of the current
// level written into bit 'level'. The decoded bit of a branch into state ns
// is the newest bit of ns.
//
// A frame starts with a symbol flagged in_first: the all-zero state then
// starts at metric 0 and the others at BIG, which exceeds any real path
// metric, so only paths leaving state 0 can survive. On the symbol flagged
// in_last the decision is taken: with 'terminated' = 1 (the message carries
// its K-1 zero tail) the path ending in state 0 is released; otherwise the
// path of the smallest metric (lowest state index on equal metrics) is,
// which is the truncated-window mode for long streams. The decision appears
// with out_valid one clock after the last symbol; frames may follow back to
// back. Equal candidate metrics go to the second entering path (qcm rule);
// tie_count counts such events on reachable paths.
//
// Register exchange, the BIG start metric and the window decision rule are
// this design's choices. Metric width PM_W is sized so that BIG plus the
// worst metric of a MAX_SYM-symbol frame cannot overflow.
module viterbi_decoder
  import viterbi_pkg::*;
#(
  parameter  int unsigned MAX_SYM = 15,                       // window: 5K symbols
  localparam int unsigned LW      = $clog2(MAX_SYM + 1),
  localparam int unsigned PM_W    = $clog2(4 * MAX_SYM + 2)
) (
  input  logic               clk,
  input  logic               rst_n,        // asynchronous, active low
  input  logic               in_valid,
  input  logic               in_first,     // first symbol of a frame
  input  logic               in_last,      // last symbol of a frame
  input  logic               terminated,   // with in_last: frame ends in state 0
  input  sym_t               in_sym,       // received {A1, A2}
  output logic               out_valid,
  output logic [MAX_SYM-1:0] out_bits,     // bit j: decoded bit of level j
  output logic [LW-1:0]      out_len,      // number of levels in the frame
  output logic [PM_W-1:0]    out_metric,   // metric of the released path
  output logic [15:0]        tie_count
);
  localparam logic [PM_W-1:0] BIG = PM_W'(2 * MAX_SYM + 1);

  logic [PM_W-1:0]    pm_q   [NSTATES];
  logic [MAX_SYM-1:0] path_q [NSTATES];
  logic [LW-1:0]      lvl_q;

  logic [PM_W-1:0]    pm_src   [NSTATES];
  logic [MAX_SYM-1:0] path_src [NSTATES];
  logic [LW-1:0]      lvl;
  logic [PM_W-1:0]    pm_d     [NSTATES];
  logic [MAX_SYM-1:0] path_d   [NSTATES];
  logic [NSTATES-1:0] o1, tie, tie_real;

  // metric and path feeding this level: initial values on the first symbol
  always_comb begin
    lvl = in_first ? '0 : lvl_q;
    for (int s = 0; s < NSTATES; s++) begin
      pm_src[s]   = in_first ? ((s == 0) ? '0 : BIG) : pm_q[s];
      path_src[s] = in_first ? '0 : path_q[s];
    end
  end

  for (genvar ns = 0; ns < NSTATES; ns++) begin : g_node
    localparam state_t P0 = pred_state(state_t'(ns), 1'b0);
    localparam state_t P1 = pred_state(state_t'(ns), 1'b1);
    localparam state_t NS = state_t'(ns);
    localparam logic   U  = NS[M-1];                    // newest bit = decoded bit
    localparam sym_t   B0 = branch_sym(U, P0);
    localparam sym_t   B1 = branch_sym(U, P1);
    logic [PM_W:0] pm_new;

    qv_cell #(.W(PM_W)) u_node (
      .a(in_sym), .b0(B0), .b1(B1), .pm0(pm_src[P0]), .pm1(pm_src[P1]),
      .pm_o(pm_new), .o1(o1[ns]), .tie(tie[ns]));

    always_comb begin
      pm_d[ns]        = pm_new[PM_W-1:0];
      path_d[ns]      = o1[ns] ? path_src[P0] : path_src[P1];
      path_d[ns][lvl] = U;
    end
    assign tie_real[ns] = tie[ns] && (pm_new < {1'b0, BIG});
  end

  // state released at the end of a frame
  state_t sel;
  always_comb begin
    sel = '0;
    if (!terminated) begin
      for (int s = 1; s < NSTATES; s++)
        if (pm_d[s] < pm_d[sel]) sel = state_t'(s);
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int s = 0; s < NSTATES; s++) begin
        pm_q[s]   <= '0;
        path_q[s] <= '0;
      end
      lvl_q      <= '0;
      out_valid  <= 1'b0;
      out_bits   <= '0;
      out_len    <= '0;
      out_metric <= '0;
      tie_count  <= '0;
    end else begin
      out_valid <= in_valid && in_last;
      if (in_valid) begin
        for (int s = 0; s < NSTATES; s++) begin
          pm_q[s]   <= pm_d[s];
          path_q[s] <= path_d[s];
        end
        lvl_q     <= lvl + 1'b1;
        tie_count <= tie_count + 16'($countones(tie_real));
        if (in_last) begin
          out_bits   <= path_d[sel];
          out_metric <= pm_d[sel];
          out_len    <= lvl + 1'b1;
        end
      end
    end
  end

  // a frame may not be longer than the path registers
  a_frame_len : assert property (@(posedge clk) disable iff (!rst_n)
    in_valid && !in_first |-> lvl_q < LW'(MAX_SYM));
endmodule
