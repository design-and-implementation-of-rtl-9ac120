// tb_convolutional_encoder: self-checking testbench of the whole encoder.
// Every one of the 64 six-bit words is encoded and compared with the
// reference; the worked example 0x24 -> 0xBEF is checked explicitly, and so
// are the cycle counts: flag falls L+2 cycles and op is valid L+3 cycles
// after reset is released, with op all zero before that.
module tb_convolutional_encoder;
  import tb_ref_pkg::*;
  localparam int unsigned L = 6;
  logic clk = 0, rst = 1;
  logic [L-1:0] ip;
  logic [2*L-1:0] op, expw;
  logic flag;
  int checks = 0, failures = 0;
  int fall_cycle, valid_cycle;

  convolutional_encoder dut (.clk, .rst, .ip, .op, .flag);

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
    for (int m = 0; m < (1 << L); m++) begin
      ip = L'(m);
      expw = (2*L)'(ref_encode(LMAX'(ip), L));
      rst = 1;
      repeat (2) @(posedge clk);
      #1 rst = 0;
      fall_cycle = -1; valid_cycle = -1;
      for (int c = 1; c <= L + 6; c++) begin
        @(posedge clk); #1;
        if (fall_cycle < 0 && !flag) fall_cycle = c;
        if (valid_cycle < 0 && op == expw && (expw != '0 || c >= L + 3)) valid_cycle = c;
        if (c < L + 3 && expw != '0) check(op == '0, "op zero before the word is ready");
      end
      check(op == expw, $sformatf("word %b: %b expected %b", ip, op, expw));
      check(fall_cycle == L + 2, $sformatf("flag fell at cycle %0d", fall_cycle));
      check(valid_cycle == L + 3, $sformatf("op valid at cycle %0d", valid_cycle));
      if (ip == 6'h24) check(op == 12'hBEF, "0x24 must give 0xBEF");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
