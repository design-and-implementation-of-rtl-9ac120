// tb_viterbi_decoder: self-checking testbench of the Viterbi decoder.
// All 64 clean code words must decode to their messages (0xBEF to 100100
// among them). Random words with one to three bit errors must decode to a
// message whose code word is at minimum Hamming distance, and to the
// unique nearest message when there is one. done must rise 2L+2 cycles
// after reset is released.
module tb_viterbi_decoder;
  import tb_ref_pkg::*;
  localparam int unsigned L = 6;
  logic clk = 0, rst = 1;
  logic [2*L-1:0] in1;
  logic [L-1:0] do1;
  logic done;
  logic [LMAX-1:0] best;
  bit uniq;
  int checks = 0, failures = 0;
  int dmin, cyc, nerr, corrected;

  viterbi_decoder dut (.clk, .rst, .in1, .do1, .done);

  always #5 clk = ~clk;

  initial begin
    #2000000;
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

  task automatic run(logic [2*L-1:0] word);
    in1 = word;
    rst = 1;
    repeat (2) @(posedge clk);
    #1 rst = 0;
    cyc = 0;
    while (!done && cyc < 60) begin
      @(posedge clk); #1;
      cyc++;
    end
    check(cyc == 2 * L + 2, $sformatf("done after %0d cycles", cyc));
  endtask

  initial begin
    corrected = 0;
    run(12'hBEF);
    check(do1 == 6'b100100, "0xBEF must decode to 100100");
    for (int m = 0; m < (1 << L); m++) begin
      run((2*L)'(ref_encode(LMAX'(m), L)));
      check(do1 == L'(m), $sformatf("clean word of %b decoded as %b", L'(m), do1));
    end
    for (int n = 0; n < 300; n++) begin
      logic [L-1:0] msg;
      logic [2*L-1:0] rx;
      msg = L'($urandom);
      rx  = (2*L)'(ref_encode(LMAX'(msg), L));
      nerr = 1 + n % 3;
      for (int e = 0; e < nerr; e++) rx[$urandom_range(0, 2*L-1)] ^= 1'b1;
      run(rx);
      dmin = ref_ml(rx, L, best, uniq);
      check(ref_dist(LMAX'(do1), rx, L) == dmin,
            $sformatf("rx %h: decoded %b not at minimum distance %0d", rx, do1, dmin));
      if (uniq) check(do1 == L'(best), $sformatf("rx %h: decoded %b expected %b", rx, do1, L'(best)));
      if (do1 == msg && rx != (2*L)'(ref_encode(LMAX'(msg), L))) corrected++;
    end
    $display("words with errors decoded to the sent message: %0d", corrected);
    check(corrected > 0, "some errors corrected");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
