// tb_sd: self-checking testbench of sd, the encoder state machine.
// It feeds random bits with random idle gaps and compares every code symbol
// with the table-driven reference, tracking the state independently. It
// also replays the transitions of the code's state table starting from 00.
module tb_sd;
  import tb_ref_pkg::*;
  logic clk = 0, rst = 1;
  logic ip = 0, ip_valid = 0;
  logic [1:0] op;
  logic op_valid;
  int checks = 0, failures = 0;
  logic a = 0, b = 0;
  logic [1:0] exp_sym;

  sd dut (.clk, .rst, .ip, .ip_valid, .op, .op_valid);

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

  task automatic send(logic u);
    ip = u; ip_valid = 1;
    exp_sym = ref_sym(u, a, b);
    b = a; a = u;
    @(posedge clk); #1;
    ip_valid = 0;
    check(op_valid == 1'b1, "op_valid after a bit");
    check(op == exp_sym, $sformatf("symbol %b expected %b", op, exp_sym));
  endtask

  initial begin
    repeat (2) @(posedge clk);
    #1 rst = 0;
    // Input sequence of the state table: 1, 0, 1, 0, 0, 0.
    send(1); check(op == 2'b10, "table row 00/1");
    send(0); check(op == 2'b11, "table row 10/0");
    send(1); check(op == 2'b01, "table row 01/1");
    send(0); check(op == 2'b11, "table row 10/0");
    send(0); check(op == 2'b11, "table row 01/0");
    send(0); check(op == 2'b00, "table row 00/0");
    for (int n = 0; n < 500; n++) begin
      if ($urandom_range(0, 3) == 0) begin
        @(posedge clk); #1;
        check(op_valid == 1'b0, "no op_valid when idle");
      end
      send(1'($urandom));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
