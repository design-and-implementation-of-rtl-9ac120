// traceback: survivor path traceback of the Viterbi decoder.
//
// On start it takes the final state of the chosen path and the survivor
// decisions of all L trellis steps, and walks the path backwards one step
// per clock. In state {a, b} at time t+1 the decoded bit of step t is a, and
// the predecessor state is {b, surv[t][{a, b}]}. The decoded bit of step t
// is written to dec[L-1-t], so the first message bit ends up in the MSB.
// done goes high (and stays high) once step 0 has been written. An
// assertion checks that start does not arrive during a walk.
//
// Interface: start is a one-cycle pulse; start_state and surv must hold
// until done. Timing: L cycles from start to done. dec is cleared by reset
// and fills from its least significant end as the walk proceeds.
//
// The reference design names a traceback unit inside its add-compare-select
// block; the one-step-per-clock walk is this design's own choice.
module traceback #(
  parameter int unsigned L = conv_code_pkg::MSG_LEN
) (
  input  logic                      clk,
  input  logic                      rst,
  input  logic                      start,
  input  conv_code_pkg::state_t     start_state,
  input  logic [L-1:0][3:0]         surv,
  output logic [L-1:0]              dec,
  output logic                      done
);

  import conv_code_pkg::*;

  localparam int unsigned CW = $clog2(L + 1);

  logic          busy;
  logic [CW-1:0] t;
  state_t        st;

  // A new walk may only start when the previous one has ended.
  a_no_restart: assert property (@(posedge clk) disable iff (rst) start |-> !busy);

  always_ff @(posedge clk) begin
    if (rst) begin
      busy <= 1'b0;
      done <= 1'b0;
      t    <= '0;
      st   <= '0;
      dec  <= '0;
    end else if (start) begin
      busy <= 1'b1;
      done <= 1'b0;
      t    <= CW'(L - 1);
      st   <= start_state;
    end else if (busy) begin
      dec[CW'(L - 1) - t] <= st[1];
      st                  <= {st[0], surv[t][st]};
      if (t == '0) begin
        busy <= 1'b0;
        done <= 1'b1;
      end else begin
        t <= t - 1'b1;
      end
    end
  end

endmodule
