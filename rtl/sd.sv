// sd: the convolutional encoder state machine (rate 1/2, constraint length 3).
//
// It holds the two previous input bits as the state {a, b} (a the newer).
// For every valid input bit u it emits the 2-bit code symbol
// {o1, o2} = {parity(G1 & {u,a,b}), parity(G2 & {u,a,b})} and moves to the
// state {u, a}. The state starts at 00 after reset.
//
// Interface: ip/ip_valid in, op/op_valid out. Timing: op is registered and
// appears one clock after the input bit.
//
// The state table, the initial state 00 and the default generators
// (G1 = 1 + D + D^2, G2 = D + D^2) follow the reference design's state table
// and measured results. The valid strobe and the registered output are this
// design's own choice.
module sd #(
  parameter logic [2:0] G1 = conv_code_pkg::G1_DEFAULT,
  parameter logic [2:0] G2 = conv_code_pkg::G2_DEFAULT
) (
  input  logic       clk,
  input  logic       rst,
  input  logic       ip,
  input  logic       ip_valid,
  output logic [1:0] op,
  output logic       op_valid
);

  import conv_code_pkg::*;

  state_t state;

  always_ff @(posedge clk) begin
    if (rst) begin
      state    <= '0;
      op       <= '0;
      op_valid <= 1'b0;
    end else begin
      op_valid <= ip_valid;
      if (ip_valid) begin
        op    <= branch_sym(G1, G2, state, ip);
        state <= {ip, state[1]};
      end
    end
  end

endmodule
