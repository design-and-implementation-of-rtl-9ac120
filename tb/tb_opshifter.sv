// tb_opshifter: self-checking testbench of opshifter, the symbol collector.
// It feeds random symbols with random gaps and checks the word, the flag
// (high until the L-th symbol, low after) and that extra symbols are
// ignored.
module tb_opshifter;
  localparam int unsigned L = 6;
  logic clk = 0, rst = 1;
  logic [1:0] ip = 0;
  logic ip_valid = 0;
  logic [2*L-1:0] op, expw;
  logic flag;
  int checks = 0, failures = 0;

  opshifter #(.L(L)) dut (.clk, .rst, .ip, .ip_valid, .op, .flag);

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
    for (int n = 0; n < 40; n++) begin
      rst = 1; ip_valid = 0;
      repeat (2) @(posedge clk);
      #1 rst = 0;
      check(flag == 1'b1, "flag high after reset");
      check(op == '0, "word cleared by reset");
      expw = '0;
      for (int i = 0; i < L; i++) begin
        while ($urandom_range(0, 2) == 0) begin
          @(posedge clk); #1;
          check(flag == 1'b1, "flag stays high while idle");
        end
        ip = 2'($urandom); ip_valid = 1;
        expw = {expw[2*L-3:0], ip};
        @(posedge clk); #1;
        ip_valid = 0;
        check(flag == (i < L - 1), $sformatf("flag after symbol %0d", i));
      end
      check(op == expw, $sformatf("word %h expected %h", op, expw));
      ip = 2'($urandom); ip_valid = 1;
      @(posedge clk); #1;
      ip_valid = 0;
      check(op == expw, "extra symbol ignored");
      check(flag == 1'b0, "flag stays low");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
