// tb_ref_pkg: reference models for the testbenches.
//
// The encoder reference is table driven: for the state {a, b} and the input
// u it looks the code symbol up in a table written out by hand from the
// code's state table (o1 = u xor a xor b, o2 = a xor b). The decoder
// reference is exhaustive: it encodes every L-bit word and reports the
// smallest Hamming distance to the received word, and whether exactly one
// word reaches it.
package tb_ref_pkg;

  localparam int unsigned LMAX = 16;

  // Symbol table indexed by {u, a, b}.
  function automatic logic [1:0] ref_sym(logic u, logic a, logic b);
    logic [1:0] tbl [8];
    tbl[3'b000] = 2'b00;  tbl[3'b001] = 2'b11;
    tbl[3'b010] = 2'b11;  tbl[3'b011] = 2'b00;
    tbl[3'b100] = 2'b10;  tbl[3'b101] = 2'b01;
    tbl[3'b110] = 2'b01;  tbl[3'b111] = 2'b10;
    return tbl[{u, a, b}];
  endfunction

  // Code word of an L-bit message, first bit = msg[L-1], first symbol in
  // the two most significant bits, start state 00, no tail.
  function automatic logic [2*LMAX-1:0] ref_encode(logic [LMAX-1:0] msg, int L);
    logic a, b, u;
    logic [2*LMAX-1:0] cw;
    a = 0; b = 0; cw = '0;
    for (int i = L - 1; i >= 0; i--) begin
      u  = msg[i];
      cw = {cw[2*LMAX-3:0], ref_sym(u, a, b)};
      b  = a;
      a  = u;
    end
    return cw;
  endfunction

  function automatic int popc(logic [2*LMAX-1:0] x);
    int n;
    n = 0;
    for (int i = 0; i < 2 * LMAX; i++) n += int'(x[i]);
    return n;
  endfunction

  // Hamming distance of msg's code word to the received word rx.
  function automatic int ref_dist(logic [LMAX-1:0] msg, logic [2*LMAX-1:0] rx, int L);
    return popc(ref_encode(msg, L) ^ rx);
  endfunction

  // Minimum distance over all messages; uniq = only one message reaches it.
  function automatic int ref_ml(logic [2*LMAX-1:0] rx, int L,
                                output logic [LMAX-1:0] best, output bit uniq);
    int dmin, n, dd;
    dmin = 1 << 30; n = 0; best = '0;
    for (int m = 0; m < (1 << L); m++) begin
      dd = ref_dist(LMAX'(m), rx, L);
      if (dd < dmin) begin
        dmin = dd; n = 1; best = LMAX'(m);
      end else if (dd == dmin) begin
        n++;
      end
    end
    uniq = (n == 1);
    return dmin;
  endfunction

endpackage
