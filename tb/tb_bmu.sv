// tb_bmu: self-checking testbench of bmu, the branch metric unit.
// For random received words it checks, for each of the L steps, all eight
// branch metrics against distances worked out from the reference symbol
// table, the bm_valid strobe, the last_state mark on the final step and
// that the unit stops after L steps.
module tb_bmu;
  import tb_ref_pkg::*;
  import conv_code_pkg::bm_t;
  localparam int unsigned L = 6;
  logic clk = 0, rst = 1;
  logic [2*L-1:0] in1;
  bm_t [7:0] d;
  logic bm_valid, last_state;
  logic [1:0] rx, es;
  int checks = 0, failures = 0;
  int expd;

  bmu #(.L(L)) dut (.clk, .rst, .in1, .d, .bm_valid, .last_state);

  always #5 clk = ~clk;

  initial begin
    #200000;
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
    for (int n = 0; n < 60; n++) begin
      in1 = (n == 0) ? 12'hBEF : (2*L)'($urandom);
      rst = 1;
      repeat (2) @(posedge clk);
      #1 rst = 0;
      for (int t = 0; t < L + 3; t++) begin
        @(posedge clk); #1;
        if (t < L) begin
          check(bm_valid == 1'b1, "bm_valid");
          check(last_state == (t == L - 1), "last_state");
          rx = in1[2*L-1-2*t -: 2];
          for (int p = 0; p < 4; p++) begin
            for (int u = 0; u < 2; u++) begin
              es = ref_sym(u[0], p[1], p[0]);
              expd = int'(rx[1] ^ es[1]) + int'(rx[0] ^ es[0]);
              check(int'(d[2*p+u]) == expd,
                    $sformatf("step %0d branch %0d: %0d expected %0d", t, 2*p+u, d[2*p+u], expd));
            end
          end
        end else begin
          check(bm_valid == 1'b0 && last_state == 1'b0, "idle after L steps");
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
