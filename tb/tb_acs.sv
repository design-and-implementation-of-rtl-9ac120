// tb_acs: self-checking testbench of acs (add-compare-select, survivor
// memory and traceback).
// For random received words, clean and with up to three bit errors, it
// feeds the branch metrics step by step (with random idle cycles between
// steps) and checks the decoded word against an exhaustive search over all
// messages: its code word must be at the minimum Hamming distance from the
// received word, and must be the unique nearest message when there is one.
// It also checks that done rises L+1 cycles after the last step is taken.
module tb_acs;
  import tb_ref_pkg::*;
  import conv_code_pkg::bm_t;
  localparam int unsigned L = 6;
  logic clk = 0, rst = 1;
  bm_t [7:0] d;
  logic bm_valid = 0, last_state = 0;
  logic [L-1:0] do1, msg;
  logic done;
  logic [2*L-1:0] rx;
  logic [1:0] sym, es;
  logic [LMAX-1:0] best;
  bit uniq;
  int checks = 0, failures = 0;
  int dmin, cyc, nerr;

  acs #(.L(L)) dut (.clk, .rst, .d, .bm_valid, .last_state, .do1, .done);

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

  initial begin
    d = '0;
    for (int n = 0; n < 400; n++) begin
      msg = L'($urandom);
      rx  = (2*L)'(ref_encode(LMAX'(msg), L));
      nerr = n % 4;
      for (int e = 0; e < nerr; e++) rx[$urandom_range(0, 2*L-1)] ^= 1'b1;
      if (n == 0) rx = 12'hBEF;
      rst = 1;
      repeat (2) @(posedge clk);
      #1 rst = 0;
      for (int t = 0; t < L; t++) begin
        while ($urandom_range(0, 3) == 0) @(posedge clk);
        #1;
        sym = rx[2*L-1-2*t -: 2];
        for (int i = 0; i < 8; i++) begin
          es = ref_sym(i[0], i[2], i[1]);
          d[i] = bm_t'(int'(sym[1] ^ es[1]) + int'(sym[0] ^ es[0]));
        end
        bm_valid = 1; last_state = (t == L - 1);
        @(posedge clk); #1;
        bm_valid = 0; last_state = 0;
        d = bm_t'($urandom);
      end
      cyc = 0;
      while (!done && cyc < 50) begin
        @(posedge clk); #1;
        cyc++;
      end
      check(cyc == L + 1, $sformatf("done after %0d cycles", cyc));
      dmin = ref_ml(rx, L, best, uniq);
      check(ref_dist(LMAX'(do1), rx, L) == dmin,
            $sformatf("rx %h: decoded %b at distance %0d, minimum %0d",
                      rx, do1, ref_dist(LMAX'(do1), rx, L), dmin));
      if (uniq) check(do1 == L'(best), $sformatf("rx %h: decoded %b expected %b", rx, do1, L'(best)));
      if (n == 0) check(do1 == 6'b100100, "0xBEF must decode to 100100");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
