// tb_conv_code_pkg: self-checking testbench of the shared code package.
// It compares branch_sym, with the default generators, against the
// hand-written state table of the code for all eight (state, input) pairs,
// and sym_dist against a bit count for all sixteen symbol pairs. The
// package's sizes must be those of the reference design (6 message bits,
// 12 code bits, constraint length 3).
module tb_conv_code_pkg;
  import conv_code_pkg::*;
  import tb_ref_pkg::ref_sym;
  logic clk = 0;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  initial begin
    #10000;
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
    @(posedge clk);
    check(MSG_LEN == 6 && CODE_LEN == 12 && K == 3, "block sizes");
    for (int s = 0; s < 4; s++) begin
      for (int u = 0; u < 2; u++) begin
        sym_t got, exp_s;
        got   = branch_sym(G1_DEFAULT, G2_DEFAULT, state_t'(s), u[0]);
        exp_s = ref_sym(u[0], s[1], s[0]);
        check(got == exp_s, $sformatf("state %b input %0d: %b expected %b", 2'(s), u, got, exp_s));
      end
    end
    for (int x = 0; x < 4; x++) begin
      for (int y = 0; y < 4; y++) begin
        int e;
        e = $countones(2'(x) ^ 2'(y));
        check(int'(sym_dist(sym_t'(x), sym_t'(y))) == e, $sformatf("distance %0d %0d", x, y));
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
