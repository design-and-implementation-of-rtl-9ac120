// conv_viterbi_system: convolutional encoder and Viterbi decoder combined.
//
// The encoder turns the L-bit word enc_in into the 2L-bit code word
// code_out. The channel between the two ends is outside this module:
// code_out leaves it and the received word comes back on code_in, with or
// without bit errors. The decoder is held in reset until the encoder has
// finished and its code word has been registered (one cycle after the
// encoder's flag falls); it then decodes code_in into dec_out and raises
// dec_done.
//
// Interface: clk, rst (synchronous, active high; one reset runs one word
// through both ends), enc_in (hold stable), code_out, enc_flag (high while
// encoding), code_in (hold stable once code_out is valid), dec_out,
// dec_done. Timing: code_out is valid L+3 cycles after reset is released,
// dec_done rises 2L+2 cycles after that.
//
// The two halves and their sizes follow the reference design, which tests
// them in one device; the way the decoder is started after the encoder is
// this design's own.
module conv_viterbi_system #(
  parameter int unsigned L  = conv_code_pkg::MSG_LEN,
  parameter logic [2:0]  G1 = conv_code_pkg::G1_DEFAULT,
  parameter logic [2:0]  G2 = conv_code_pkg::G2_DEFAULT
) (
  input  logic           clk,
  input  logic           rst,
  input  logic [L-1:0]   enc_in,
  output logic [2*L-1:0] code_out,
  output logic           enc_flag,
  input  logic [2*L-1:0] code_in,
  output logic [L-1:0]   dec_out,
  output logic           dec_done
);

  logic enc_busy_q;
  logic dec_rst;

  convolutional_encoder #(.L(L), .G1(G1), .G2(G2)) u_enc (
    .clk(clk), .rst(rst), .ip(enc_in), .op(code_out), .flag(enc_flag)
  );

  // The encoder's output register loads on the first cycle with flag low;
  // start the decoder one cycle after that.
  always_ff @(posedge clk) begin
    if (rst) enc_busy_q <= 1'b1;
    else     enc_busy_q <= enc_flag;
  end

  assign dec_rst = rst | enc_busy_q;

  viterbi_decoder #(.L(L), .G1(G1), .G2(G2)) u_dec (
    .clk(clk), .rst(dec_rst), .in1(code_in), .do1(dec_out), .done(dec_done)
  );

endmodule
