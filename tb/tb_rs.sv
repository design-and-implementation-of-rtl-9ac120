// tb_rs: self-checking testbench of rs, the parallel-to-serial front end.
// For random words it checks that exactly L bits come out, one per cycle,
// most significant bit first, starting the cycle after reset is released,
// and that nothing more follows.
module tb_rs;
  localparam int unsigned L = 6;
  logic clk = 0, rst = 1;
  logic [L-1:0] ip;
  logic q, q_valid;
  int checks = 0, failures = 0;

  rs #(.L(L)) dut (.clk, .rst, .ip, .q, .q_valid);

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
    for (int n = 0; n < 40; n++) begin
      ip  = (n == 0) ? 6'b100100 : L'($urandom);
      rst = 1;
      repeat (2) @(posedge clk);
      #1 rst = 0;
      for (int c = 0; c < L + 4; c++) begin
        @(posedge clk); #1;
        if (c < L) begin
          check(q_valid == 1'b1, $sformatf("valid at cycle %0d", c));
          check(q == ip[L-1-c], $sformatf("bit %0d of %b", c, ip));
        end else begin
          check(q_valid == 1'b0, $sformatf("no valid at cycle %0d", c));
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
