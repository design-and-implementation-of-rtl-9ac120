// opshifter: collects the encoder's 2-bit code symbols into one code word.
//
// Each valid symbol is shifted in two bits at a time, so that after L
// symbols the first symbol sits in the two most significant bits and the
// last in the two least significant ones. flag is high from reset until the
// L-th symbol has been taken in and low afterwards; further symbols are
// ignored until the next reset.
//
// Interface: ip/ip_valid in; op (2L bits) and flag out. Timing: flag falls in
// the cycle after the L-th valid symbol is accepted, with op complete.
//
// The reference design describes this unit as a shift register moving two
// bits at a time, with a flag that is high while the word is being built.
// The word layout follows its measured code word (0x24 -> 0xBEF); the symbol
// counter and the valid strobe are this design's own.
module opshifter #(
  parameter int unsigned L = conv_code_pkg::MSG_LEN
) (
  input  logic           clk,
  input  logic           rst,
  input  logic [1:0]     ip,
  input  logic           ip_valid,
  output logic [2*L-1:0] op,
  output logic           flag
);

  localparam int unsigned CW = $clog2(L + 1);

  logic [CW-1:0] cnt;

  always_ff @(posedge clk) begin
    if (rst) begin
      cnt <= '0;
      op  <= '0;
    end else if (ip_valid && cnt < CW'(L)) begin
      op  <= {op[2*L-3:0], ip};
      cnt <= cnt + 1'b1;
    end
  end

  assign flag = (cnt < CW'(L));

endmodule
