// bmu: branch metric unit of the hard-decision Viterbi decoder.
//
// After reset it walks through the received 2L-bit word one 2-bit symbol per
// clock, first symbol in the two most significant bits. For every symbol it
// gives the Hamming distance between the received symbol and the symbol
// expected on each of the 8 trellis branches. Branch i = {p, u} (i = 2p + u)
// leaves state p on input bit u; d[i] is its metric (0, 1 or 2).
// bm_valid marks each of the L metric sets, last_state marks the final one.
// It stops after L symbols and waits for the next reset.
//
// Interface: in1 must be held stable during the L cycles after reset is
// released. Timing: metric set t is registered and valid in the (t+1)-th
// cycle after reset is released.
//
// The reference design gives this unit the ports in1, clk, rst, eight 2-bit
// metrics and last_state; the bm_valid strobe, the branch numbering and the
// symbol order are this design's own (the order follows the encoder).
module bmu #(
  parameter int unsigned L  = conv_code_pkg::MSG_LEN,
  parameter logic [2:0]  G1 = conv_code_pkg::G1_DEFAULT,
  parameter logic [2:0]  G2 = conv_code_pkg::G2_DEFAULT
) (
  input  logic                     clk,
  input  logic                     rst,
  input  logic [2*L-1:0]           in1,
  output conv_code_pkg::bm_t [7:0] d,
  output logic                     bm_valid,
  output logic                     last_state
);

  import conv_code_pkg::*;

  localparam int unsigned CW = $clog2(L + 1);

  logic [CW-1:0] cnt;
  sym_t          rx;
  bm_t [7:0]     d_next;

  // Received symbol of the current step.
  assign rx = in1[(2*L-1) - 2*int'(cnt) -: 2];

  always_comb begin
    for (int i = 0; i < 8; i++) begin
      d_next[i] = sym_dist(rx, branch_sym(G1, G2, state_t'(i >> 1), i[0]));
    end
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      cnt        <= '0;
      d          <= '0;
      bm_valid   <= 1'b0;
      last_state <= 1'b0;
    end else if (cnt < CW'(L)) begin
      d          <= d_next;
      bm_valid   <= 1'b1;
      last_state <= (cnt == CW'(L - 1));
      cnt        <= cnt + 1'b1;
    end else begin
      bm_valid   <= 1'b0;
      last_state <= 1'b0;
    end
  end

endmodule
