// tb_fde: self-checking testbench of fde, the clock-enabled output register.
// Random data and enables; q must follow d only on enabled edges and clear
// on reset.
module tb_fde;
  localparam int unsigned W = 12;
  logic clk = 0, rst = 1, ce = 0;
  logic [W-1:0] d = 0, q, expq;
  int checks = 0, failures = 0;

  fde #(.W(W)) dut (.clk, .rst, .ce, .d, .q);

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
    @(posedge clk); #1;
    check(q == '0, "reset clears q");
    rst = 0; expq = '0;
    for (int n = 0; n < 500; n++) begin
      d  = W'($urandom);
      ce = 1'($urandom);
      rst = ($urandom_range(0, 49) == 0);
      @(posedge clk); #1;
      if (rst)     expq = '0;
      else if (ce) expq = d;
      check(q == expq, $sformatf("q %h expected %h", q, expq));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
