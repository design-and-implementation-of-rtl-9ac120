// tb_traceback: self-checking testbench of the traceback unit.
// For a random message it builds a survivor memory in which the decisions
// along that message's trellis path are set accordingly and all others are
// random, starts the walk from the path's final state and expects the
// message back after exactly L cycles.
module tb_traceback;
  localparam int unsigned L = 6;
  logic clk = 0, rst = 1, start = 0;
  logic [1:0] start_state;
  logic [L-1:0][3:0] surv;
  logic [L-1:0] dec, msg;
  logic done;
  logic [1:0] st;
  int checks = 0, failures = 0;
  int cyc;

  traceback #(.L(L)) dut (.clk, .rst, .start, .start_state, .surv, .dec, .done);

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
    for (int n = 0; n < 200; n++) begin
      msg = L'($urandom);
      for (int t = 0; t < L; t++) surv[t] = 4'($urandom);
      // Walk the message forward; at step t the state goes from {a,b} to
      // {u,a} and the decision stored for {u,a} names b.
      st = 2'b00;
      for (int t = 0; t < L; t++) begin
        logic u;
        u = msg[L-1-t];
        surv[t][{u, st[1]}] = st[0];
        st = {u, st[1]};
      end
      start_state = st;
      rst = 1;
      @(posedge clk); #1;
      rst = 0;
      start = 1;
      @(posedge clk); #1;
      start = 0;
      cyc = 0;
      while (!done && cyc < 50) begin
        @(posedge clk); #1;
        cyc++;
      end
      check(done == 1'b1, "done");
      check(cyc == L, $sformatf("took %0d cycles", cyc));
      check(dec == msg, $sformatf("decoded %b expected %b", dec, msg));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
