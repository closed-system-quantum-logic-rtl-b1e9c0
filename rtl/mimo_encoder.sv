// mimo_encoder: S convolutional encoders working side by side.
//
// Each stream of a batch has its own conv_encoder; all share the valid and
// clear controls, so S messages are encoded simultaneously, one symbol per
// stream per clock with one clock of latency.
module mimo_encoder
  import viterbi_pkg::*;
#(
  parameter int unsigned S = 3    // number of parallel streams
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         clear,
  input  logic         in_valid,
  input  logic [S-1:0] in_bits,    // bit i belongs to stream i
  output logic         out_valid,
  output sym_t [S-1:0] out_syms
);
  logic [S-1:0] v;

  for (genvar i = 0; i < S; i++) begin : g_enc
    conv_encoder u_enc (.clk(clk), .rst_n(rst_n), .clear(clear), .in_valid(in_valid),
                        .in_bit(in_bits[i]), .out_valid(v[i]), .out_sym(out_syms[i]));
  end
  assign out_valid = v[0];
endmodule
