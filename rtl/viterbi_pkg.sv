// viterbi_pkg: constants and helper functions shared by the encoder and decoder.
//
// The code is the rate-1/2, constraint-length-3 convolutional code with generator
// polynomials g1(D) = 1 + D + D^2 and g2(D) = 1 + D^2. A generator is stored as a
// bit vector whose bit i is the coefficient of D^i. The encoder state is the
// content of the M = K-1 stage shift register, newest bit in the MSB, so the
// four states a, b, c, d of the trellis are 2'b00, 2'b10, 2'b01, 2'b11.
// A received or transmitted symbol is {path #1 bit, path #2 bit}.
package viterbi_pkg;

  localparam int unsigned K       = 3;            // constraint length
  localparam int unsigned M       = K - 1;        // encoder memory
  localparam int unsigned NSTATES = 1 << M;       // trellis nodes per level
  localparam logic [K-1:0] G1     = 3'b111;       // 1 + D + D^2
  localparam logic [K-1:0] G2     = 3'b101;       // 1 + D^2

  typedef logic [M-1:0] state_t;
  typedef logic [1:0]   sym_t;   // {path #1, path #2}

  // Code symbol produced when input bit u enters the encoder in state s.
  function automatic sym_t branch_sym(input logic u, input state_t s);
    logic [K-1:0] r;             // r[i] is the register tap that multiplies D^i
    r[0] = u;
    for (int i = 1; i <= M; i++) r[i] = s[M-i];
    return {^(r & G1), ^(r & G2)};
  endfunction

  // State reached from s with input u.
  function automatic state_t next_state(input logic u, input state_t s);
    return {u, s[M-1:1]};
  endfunction

  // Predecessor b (0 or 1) of state ns: its oldest bit is b.
  function automatic state_t pred_state(input state_t ns, input logic b);
    return {ns[M-2:0], b};
  endfunction

endpackage
