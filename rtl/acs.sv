// acs: add-compare-select unit of the Viterbi decoder, with its survivor
// memory and traceback.
//
// It keeps one path metric per trellis state. For each valid set of branch
// metrics it updates all four states in parallel: state s = {a, b} can be
// reached from p0 = {b, 0} and p1 = {b, 1} on input a; the candidate metrics
// pm[p] + d[2p + a] are compared, the smaller survives (p0 on a tie), and the
// one-bit decision (1 = p1 won) is stored for that step. The metrics start at
// 0 for state 00 and at 2L+1, worse than any real path, for the others, so
// only paths from state 00 count. After the set marked last_state, the state
// with the smallest final metric (lowest state number on a tie) is handed to
// the traceback unit, which produces the decoded word do1.
//
// Interface: d, bm_valid, last_state from the branch metric unit; do1 and
// done out. Timing: one trellis step per clock; the traceback starts two
// cycles after the last metric set arrives and takes L cycles.
// The metric width is sized so that no metric can overflow in one block,
// which makes normalisation unnecessary. An assertion checks that no more
// than L metric sets arrive and that last_state marks the L-th.
//
// The reference design gives this block's function, its ports (eight 2-bit
// branch metrics, last_state, do1) and the traceback inside it. The initial
// metrics, the tie rules and the choice of the best final state are this
// design's own.
module acs #(
  parameter int unsigned L = conv_code_pkg::MSG_LEN
) (
  input  logic                     clk,
  input  logic                     rst,
  input  conv_code_pkg::bm_t [7:0] d,
  input  logic                     bm_valid,
  input  logic                     last_state,
  output logic [L-1:0]             do1,
  output logic                     done
);

  import conv_code_pkg::*;

  localparam int unsigned CW   = $clog2(L + 1);
  localparam int unsigned PM_W = $clog2(4 * L + 2);
  localparam logic [PM_W-1:0] PM_INF = PM_W'(2 * L + 1);

  typedef logic [PM_W-1:0] pm_t;

  pm_t [3:0]         pm, pm_next;
  logic [3:0]        dec_bits;
  logic [L-1:0][3:0] surv;
  logic [CW-1:0]     step;
  logic              tb_start;
  state_t            best;

  // Add, compare, select for every state.
  always_comb begin
    for (int s = 0; s < 4; s++) begin
      state_t p0, p1;
      pm_t    m0, m1;
      p0 = state_t'({s[0], 1'b0});
      p1 = state_t'({s[0], 1'b1});
      m0 = pm[p0] + pm_t'(d[{p0, s[1]}]);
      m1 = pm[p1] + pm_t'(d[{p1, s[1]}]);
      dec_bits[s] = (m1 < m0);
      pm_next[s]  = (m1 < m0) ? m1 : m0;
    end
  end

  // Global winner: state with the smallest path metric.
  always_comb begin
    best = '0;
    for (int s = 1; s < 4; s++) begin
      if (pm[s] < pm[best]) best = state_t'(s);
    end
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      pm       <= {PM_INF, PM_INF, PM_INF, pm_t'(0)};
      surv     <= '0;
      step     <= '0;
      tb_start <= 1'b0;
    end else begin
      tb_start <= 1'b0;
      if (bm_valid && step < CW'(L)) begin
        pm         <= pm_next;
        surv[step] <= dec_bits;
        step       <= step + 1'b1;
        tb_start   <= last_state;
      end
    end
  end

  // At most L metric sets arrive per block, and only the L-th is the last.
  a_step_limit: assert property (@(posedge clk) disable iff (rst)
    bm_valid |-> (step < CW'(L)) && (last_state == (step == CW'(L - 1))));

  traceback #(.L(L)) t1 (
    .clk(clk), .rst(rst), .start(tb_start), .start_state(best),
    .surv(surv), .dec(do1), .done(done)
  );

endmodule
