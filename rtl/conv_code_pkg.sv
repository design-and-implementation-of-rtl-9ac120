// conv_code_pkg: constants and helper functions shared by the rate-1/2,
// constraint-length-3 convolutional encoder and its Viterbi decoder.
//
// The trellis has four states. A state is written {a, b}, where a is the
// most recent input bit (the first delay stage, D) and b the one before it
// (the second stage, D^2). On input u the state {a, b} moves to {u, a}.
// A generator is a 3-bit tap mask over {u, a, b}: bit 2 taps the current
// input, bit 1 taps D, bit 0 taps D^2. The code symbol is {o1, o2}, o1 taken
// from generator G1 and sent first.
//
// The default generators, G1 = 1 + D + D^2 and G2 = D + D^2, reproduce the
// state table and the measured 0x24 -> 0xBEF code word of the reference
// design. The block length of 6 message bits (12 code bits, no tail bits)
// is also the reference design's.
package conv_code_pkg;

  // Message bits per block and code bits per block (rate 1/2).
  localparam int unsigned MSG_LEN  = 6;
  localparam int unsigned CODE_LEN = 2 * MSG_LEN;
  // Constraint length.
  localparam int unsigned K        = 3;
  // Generator tap masks over {u, D, D^2}.
  localparam logic [K-1:0] G1_DEFAULT = 3'b111;
  localparam logic [K-1:0] G2_DEFAULT = 3'b011;

  typedef logic [K-2:0] state_t;   // {a, b}
  typedef logic [1:0]   sym_t;     // {o1, o2}
  typedef logic [1:0]   bm_t;      // Hamming distance of one symbol, 0..2

  // Code symbol emitted when input u arrives in state s.
  function automatic sym_t branch_sym(logic [K-1:0] g1, logic [K-1:0] g2,
                                      state_t s, logic u);
    logic [K-1:0] taps;
    taps = {u, s};
    return {^(g1 & taps), ^(g2 & taps)};
  endfunction

  // Hamming distance between two code symbols.
  function automatic bm_t sym_dist(sym_t x, sym_t y);
    sym_t d;
    d = x ^ y;
    return bm_t'({1'b0, d[1]}) + bm_t'({1'b0, d[0]});
  endfunction

endpackage
