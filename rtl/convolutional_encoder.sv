// convolutional_encoder: rate-1/2, constraint-length-3 block encoder.
//
// One reset starts one encoding of the L-bit word ip into the 2L-bit code
// word op. The chain is: rs sends ip bit by bit (MSB first), sd turns each
// bit into a 2-bit symbol, opshifter gathers the symbols, and fde loads the
// gathered word into op when opshifter's flag falls (its enable is the
// inverted flag). No tail bits are appended, so L bits give exactly 2L code
// bits. With the defaults, ip = 6'b100100 gives op = 12'b1011_1110_1111.
//
// Interface: clk, rst (synchronous, active high), ip (hold stable during the
// encoding), op, flag (high while encoding, low once op is valid).
// Timing: flag falls L+2 cycles after reset is released and op is valid one
// cycle later (L+3 cycles) and held until the next reset.
//
// The partition into rs, sd, opshifter, an inverter and fde follows the
// reference design; the cycle-level timing is this design's own.
module convolutional_encoder #(
  parameter int unsigned L  = conv_code_pkg::MSG_LEN,
  parameter logic [2:0]  G1 = conv_code_pkg::G1_DEFAULT,
  parameter logic [2:0]  G2 = conv_code_pkg::G2_DEFAULT
) (
  input  logic           clk,
  input  logic           rst,
  input  logic [L-1:0]   ip,
  output logic [2*L-1:0] op,
  output logic           flag
);

  logic           bit_q, bit_valid;
  logic [1:0]     sym;
  logic           sym_valid;
  logic [2*L-1:0] word;
  logic           flag_inv;

  rs #(.L(L)) s1 (
    .clk(clk), .rst(rst), .ip(ip), .q(bit_q), .q_valid(bit_valid)
  );

  sd #(.G1(G1), .G2(G2)) e1 (
    .clk(clk), .rst(rst), .ip(bit_q), .ip_valid(bit_valid),
    .op(sym), .op_valid(sym_valid)
  );

  opshifter #(.L(L)) o1 (
    .clk(clk), .rst(rst), .ip(sym), .ip_valid(sym_valid),
    .op(word), .flag(flag)
  );

  assign flag_inv = ~flag;

  fde #(.W(2*L)) f1 (
    .clk(clk), .rst(rst), .ce(flag_inv), .d(word), .q(op)
  );

endmodule
