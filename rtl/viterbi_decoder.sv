// viterbi_decoder: hard-decision Viterbi decoder for the rate-1/2,
// constraint-length-3 code of convolutional_encoder.
//
// One reset starts one decoding of the 2L-bit received word in1 into the
// L-bit word do1. The branch metric unit (bmu) steps through in1 one symbol
// per clock and gives the Hamming distance of all 8 trellis branches; the
// add-compare-select unit (acs) updates the four path metrics, stores the
// survivor decisions and, after the last step, traces the best path back.
// The result is a maximum-likelihood decision over all L-bit words that
// start from state 00: the decoded word's code word is as close to in1, in
// Hamming distance, as any other. With the defaults in1 = 12'hBEF decodes
// to 6'b100100.
//
// Interface: clk, rst (synchronous, active high), in1 (hold stable while
// decoding), do1, done (high once do1 is final, until the next reset).
// Timing: done rises 2L+2 cycles after reset is released.
//
// The split into bmu and acs, with traceback inside acs, and the port names
// follow the reference design. done is this design's own addition.
module viterbi_decoder #(
  parameter int unsigned L  = conv_code_pkg::MSG_LEN,
  parameter logic [2:0]  G1 = conv_code_pkg::G1_DEFAULT,
  parameter logic [2:0]  G2 = conv_code_pkg::G2_DEFAULT
) (
  input  logic           clk,
  input  logic           rst,
  input  logic [2*L-1:0] in1,
  output logic [L-1:0]   do1,
  output logic           done
);

  conv_code_pkg::bm_t [7:0] d;
  logic                     bm_valid;
  logic                     last_state;

  bmu #(.L(L), .G1(G1), .G2(G2)) b1 (
    .clk(clk), .rst(rst), .in1(in1), .d(d),
    .bm_valid(bm_valid), .last_state(last_state)
  );

  acs #(.L(L)) a1 (
    .clk(clk), .rst(rst), .d(d), .bm_valid(bm_valid),
    .last_state(last_state), .do1(do1), .done(done)
  );

endmodule
