// tb_conv_viterbi_system: end-to-end testbench of the encoder and decoder
// together, at the default sizes.
//
// Each trial resets the system with a message, lets the encoder produce its
// code word, passes it through a channel model that flips a chosen set of
// bits, and checks the decoder's result: the sent message for a clean
// channel, a maximum-likelihood message (minimum Hamming distance, found by
// exhaustive search) otherwise, and the unique nearest message when there
// is one. It checks the worked example 0x24 -> 0xBEF -> 0x24 and the cycle
// counts (code word L+3 cycles, decoded word 3L+5 cycles after reset).
// It counts how often each mechanism occurred and fails if one never did:
// clean decodes, corrected channel errors, decoding to another message
// when the errors exceed what the code can correct, add-compare-select
// decisions for either predecessor, and traceback starting from a final
// state other than 00.
module tb_conv_viterbi_system;
  import tb_ref_pkg::*;
  localparam int unsigned L = conv_code_pkg::MSG_LEN;
  logic clk = 0, rst = 1;
  logic [L-1:0] enc_in, dec_out;
  logic [2*L-1:0] code_out, code_in, err;
  logic enc_flag, dec_done;
  logic [LMAX-1:0] best;
  bit uniq;
  int checks = 0, failures = 0;
  int dmin, cyc, code_cyc;
  int n_clean = 0, n_corrected = 0, n_miscorrected = 0;
  int n_sel0 = 0, n_sel1 = 0, n_tb_nonzero = 0;

  conv_viterbi_system dut (
    .clk, .rst, .enc_in, .code_out, .enc_flag, .code_in, .dec_out, .dec_done
  );

  // Channel: flips the bits set in err.
  assign code_in = code_out ^ err;

  always #5 clk = ~clk;

  // Mechanism counters, observed inside the decoder.
  always @(posedge clk) begin
    if (!dut.dec_rst && dut.u_dec.bm_valid) begin
      for (int s = 0; s < 4; s++) begin
        if (dut.u_dec.a1.dec_bits[s]) n_sel1++;
        else                          n_sel0++;
      end
    end
    if (!dut.dec_rst && dut.u_dec.a1.tb_start && dut.u_dec.a1.best != 2'b00) n_tb_nonzero++;
  end

  initial begin
    #5000000;
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

  task automatic trial(logic [L-1:0] msg, logic [2*L-1:0] flips);
    logic [2*L-1:0] cw;
    cw = (2*L)'(ref_encode(LMAX'(msg), L));
    enc_in = msg;
    err    = flips;
    rst    = 1;
    repeat (2) @(posedge clk);
    #1 rst = 0;
    cyc = 0; code_cyc = -1;
    while (!dec_done && cyc < 100) begin
      @(posedge clk); #1;
      cyc++;
      if (code_cyc < 0 && !enc_flag) code_cyc = cyc + 1;
    end
    check(code_out == cw, $sformatf("code word of %b: %b expected %b", msg, code_out, cw));
    check(code_cyc == L + 3, $sformatf("code word valid at cycle %0d", code_cyc));
    check(cyc == 3 * L + 5, $sformatf("decoded word after %0d cycles", cyc));
    if (flips == '0) begin
      check(dec_out == msg, $sformatf("clean channel: %b decoded as %b", msg, dec_out));
      if (dec_out == msg) n_clean++;
    end else begin
      dmin = ref_ml(code_in, L, best, uniq);
      check(ref_dist(LMAX'(dec_out), code_in, L) == dmin,
            $sformatf("rx %h: decoded %b not at minimum distance %0d", code_in, dec_out, dmin));
      if (uniq) check(dec_out == L'(best), $sformatf("rx %h: decoded %b expected %b", code_in, dec_out, L'(best)));
      if (dec_out == msg) n_corrected++;
      else                n_miscorrected++;
    end
  endtask

  initial begin
    // The worked example.
    trial(6'b100100, '0);
    check(code_out == 12'hBEF, "0x24 must encode to 0xBEF");
    check(dec_out == 6'h24, "0xBEF must decode to 0x24");
    // Every message over a clean channel.
    for (int m = 0; m < (1 << L); m++) trial(L'(m), '0);
    // Every single-bit error on the example word.
    for (int b = 0; b < 2 * L; b++) trial(6'b100100, (2*L)'(1) << b);
    // Random messages with one to four bit errors.
    for (int n = 0; n < 400; n++) begin
      logic [2*L-1:0] f;
      f = '0;
      for (int e = 0; e <= n % 4; e++) f[$urandom_range(0, 2*L-1)] = 1'b1;
      trial(L'($urandom), f);
    end
    $display("clean=%0d corrected=%0d miscorrected=%0d acs_sel0=%0d acs_sel1=%0d traceback_nonzero_start=%0d",
             n_clean, n_corrected, n_miscorrected, n_sel0, n_sel1, n_tb_nonzero);
    check(n_clean > 0, "clean decodes happened");
    check(n_corrected > 0, "channel errors were corrected");
    check(n_miscorrected > 0, "uncorrectable error patterns occurred");
    check(n_sel0 > 0 && n_sel1 > 0, "both add-compare-select outcomes occurred");
    check(n_tb_nonzero > 0, "traceback started from a non-zero state");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
