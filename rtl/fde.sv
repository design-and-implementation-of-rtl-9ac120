// fde: output register with clock enable.
//
// q takes d on a rising clock edge while ce is high and holds otherwise. A
// synchronous reset clears it. In the encoder it is enabled by the inverted
// busy flag of the symbol shifter, so the finished code word appears at the
// output only once it is complete.
//
// The reference design uses a clock-enabled flip-flop stage of this name;
// the width parameter and the reset, which gives the all-zero output seen
// before the word is ready, are this design's own.
module fde #(
  parameter int unsigned W = conv_code_pkg::CODE_LEN
) (
  input  logic         clk,
  input  logic         rst,
  input  logic         ce,
  input  logic [W-1:0] d,
  output logic [W-1:0] q
);

  always_ff @(posedge clk) begin
    if (rst)     q <= '0;
    else if (ce) q <= d;
  end

endmodule
