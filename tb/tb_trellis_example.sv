// tb_trellis_example: runs the decoder on the textbook trellis example of
// the code with generators 1 + D + D^2 and 1 + D^2.
//
// The message 1 1 0 1 1 is sent; its code word is 11 01 01 00 01 and the
// received word 11 01 01 10 01 carries one bit error in the fourth symbol.
// The decoder, built for that code and a 5-bit block, must return 11011,
// i.e. correct the error. The encoder, built for the same code, must give
// the code word of the survivor path, 11 01 01 00 01.
module tb_trellis_example;
  localparam int unsigned L = 5;
  localparam logic [2:0] G1 = 3'b111;
  localparam logic [2:0] G2 = 3'b101;
  logic clk = 0, rst = 1;
  logic [2*L-1:0] in1, enc_op;
  logic [L-1:0] do1;
  logic done, enc_flag;
  int checks = 0, failures = 0;
  int cyc;

  viterbi_decoder #(.L(L), .G1(G1), .G2(G2)) dec (.clk, .rst, .in1, .do1, .done);
  convolutional_encoder #(.L(L), .G1(G1), .G2(G2)) enc (
    .clk, .rst, .ip(5'b11011), .op(enc_op), .flag(enc_flag)
  );

  always #5 clk = ~clk;

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s", what);
    end
  endtask

  initial begin
    in1 = 10'b11_01_01_10_01;
    repeat (2) @(posedge clk);
    #1 rst = 0;
    cyc = 0;
    while (!done && cyc < 50) begin
      @(posedge clk); #1;
      cyc++;
    end
    check(done == 1'b1, "decoder finished");
    check(cyc == 2 * L + 2, $sformatf("decoder took %0d cycles", cyc));
    check(do1 == 5'b11011, $sformatf("decoded %b expected 11011", do1));
    check(enc_flag == 1'b0, "encoder finished");
    check(enc_op == 10'b11_01_01_00_01, $sformatf("code word %b expected 1101010001", enc_op));
    check($countones(enc_op ^ in1) == 1, "received word is one bit from the survivor path");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
