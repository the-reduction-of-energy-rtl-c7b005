// Reference model of link activity for the testbenches.
//
// Works from the definitions of the transition types, not from the encoder
// structure: for two adjacent lines, type I (one line switches) costs 1,
// type II (both switch in opposite directions) costs 2, types III and IV
// cost 0. ref_encode tries every inversion a scheme allows on the current
// flit, keeps the one with the lowest coupling cost against the previous
// link value, and resolves equal costs in the order none, odd, even, full.
// Lines are held in a 64-bit vector; only the low nl lines are used.
package link_ref_pkg;

  typedef logic [63:0] lines_t;

  function automatic int pair_cost(logic pa, logic pb, logic ca, logic cb);
    logic sa, sb;
    sa = pa ^ ca;
    sb = pb ^ cb;
    if (sa ^ sb) return 1;
    if (sa && sb && (pa != pb)) return 2;
    return 0;
  endfunction

  function automatic int coupling(lines_t prev, lines_t cur, int nl);
    int c = 0;
    for (int i = 0; i + 1 < nl; i++) c += pair_cost(prev[i], prev[i+1], cur[i], cur[i+1]);
    return c;
  endfunction

  function automatic int self_up(lines_t prev, lines_t cur, int nl);
    int c = 0;
    for (int i = 0; i < nl; i++) if (!prev[i] && cur[i]) c++;
    return c;
  endfunction

  // action: 0 none, 1 odd, 2 even, 3 full
  function automatic lines_t apply(lines_t x, int action, int nl);
    lines_t r = x;
    for (int i = 0; i < nl; i++) begin
      if ((i % 2 == 1) && (action == 1 || action == 3)) r[i] = ~x[i];
      if ((i % 2 == 0) && (action == 2 || action == 3)) r[i] = ~x[i];
    end
    return r;
  endfunction

  function automatic int link_lines(int scheme, int w);
    return (scheme == 1) ? w : w + 1;
  endfunction

  function automatic bit allowed(int scheme, int action);
    case (scheme)
      1: return action == 0 || action == 1;
      2: return action != 2;
      default: return 1'b1;
    endcase
  endfunction

  function automatic int ref_action(int scheme, lines_t x, lines_t prev, int nl);
    int best = 0;
    int bc = coupling(prev, x, nl);
    for (int a = 1; a < 4; a++) begin
      if (allowed(scheme, a) && coupling(prev, apply(x, a, nl), nl) < bc) begin
        best = a;
        bc = coupling(prev, apply(x, a, nl), nl);
      end
    end
    return best;
  endfunction

  function automatic lines_t ref_encode(int scheme, lines_t x, lines_t prev, int nl);
    return apply(x, ref_action(scheme, x, prev, nl), nl);
  endfunction

  // Payload recovered from link lines, by the control-line convention.
  function automatic lines_t ref_decode(int scheme, lines_t z, int w);
    lines_t r = '0;
    for (int i = 0; i < w - 1; i++) begin
      if (scheme == 1) r[i] = z[i] ^ ((i % 2 == 1) & z[w-1]);
      else             r[i] = z[i] ^ ((i % 2 == 1) ? z[w-1] : z[w]);
    end
    return r;
  endfunction

endpackage
