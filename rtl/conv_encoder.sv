// conv_encoder: rate-1/2 convolutional encoder, constraint length K = 3.
//
// An M = K-1 stage shift register holds the last message bits; two modulo-2
// adders tap the input and the register as given by g1(D) = 1 + D + D^2 and
// g2(D) = 1 + D^2 (both from viterbi_pkg). Each accepted input bit produces
// one registered symbol {path #1, path #2} on the next clock (latency 1,
// one symbol per clock). The two adder outputs are presented side by side as
// a symbol rather than serialised by a multiplexer; that is this design's
// choice. 'clear' empties the register at the start of a message; the caller
// appends K-1 zero tail bits to return it to the all-zero state.
module conv_encoder
  import viterbi_pkg::*;
(
  input  logic clk,
  input  logic rst_n,       // asynchronous, active low
  input  logic clear,       // synchronous: register to zero (before a message)
  input  logic in_valid,
  input  logic in_bit,
  output logic out_valid,
  output sym_t out_sym      // {path #1, path #2}
);
  state_t st;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st        <= '0;
      out_valid <= 1'b0;
      out_sym   <= '0;
    end else begin
      out_valid <= in_valid;
      if (in_valid) begin
        out_sym <= branch_sym(in_bit, clear ? state_t'('0) : st);
        st      <= next_state(in_bit, clear ? state_t'('0) : st);
      end else if (clear) begin
        st <= '0;
      end
    end
  end
endmodule
