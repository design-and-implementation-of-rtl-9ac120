// rs: parallel-to-serial front end of the convolutional encoder.
//
// After reset it reads the L-bit input word one bit per clock, most
// significant bit first, and presents each bit on q with a one-cycle
// q_valid strobe. After L bits it stops and stays idle until the next reset;
// one reset starts one encoding, as in the reference design.
//
// Interface: ip must be held stable for the L cycles after reset is
// released. Timing: bit i of the sequence (i = 0 is ip[L-1]) appears on q in
// the (i+1)-th cycle after reset is released.
//
// The reference design states only that this unit takes the 6-bit input and
// transfers it bit by bit. The bit order follows its measured code word; the
// q_valid strobe and the synchronous active-high reset are this design's own.
module rs #(
  parameter int unsigned L = conv_code_pkg::MSG_LEN
) (
  input  logic         clk,
  input  logic         rst,
  input  logic [L-1:0] ip,
  output logic         q,
  output logic         q_valid
);

  localparam int unsigned CW = $clog2(L + 1);

  logic [CW-1:0] cnt;

  always_ff @(posedge clk) begin
    if (rst) begin
      cnt     <= '0;
      q       <= 1'b0;
      q_valid <= 1'b0;
    end else if (cnt < CW'(L)) begin
      q       <= ip[CW'(L - 1) - cnt];
      q_valid <= 1'b1;
      cnt     <= cnt + 1'b1;
    end else begin
      q_valid <= 1'b0;
    end
  end

endmodule
