// vd_ref_pkg: reference model of the Cconv(2,1,3) code and of T-algorithm
// Viterbi decoding, used by the test benches to work out expected values.
//
// It is written independently of the RTL: the encoder uses the generator
// polynomials 101 and 111 as parities over the register {m,S1,S2}; the decoder
// keeps absolute integer path metrics (no normalisation), walks every state's
// two predecessors explicitly and prunes a state when its metric exceeds the
// best metric of the step by more than the threshold. Ties keep the
// predecessor with S2 = 0; trace-back starts at the lowest-numbered state that
// has the best metric.
package vd_ref_pkg;

  localparam int MAXLEN = 64;
  localparam int G1 = 5;  // 3'b101
  localparam int G2 = 7;  // 3'b111

  typedef struct {
    int pm  [4];
    bit act [4];
  } metrics_t;

  // Encoder output for message bit m in state s = {S1,S2}, packed {c1,c2}.
  function automatic int ref_code(int s, bit m);
    int reg3;
    reg3 = (int'(m) << 2) | s;
    return ($countones(reg3 & G1) % 2) * 2 + ($countones(reg3 & G2) % 2);
  endfunction

  function automatic int ref_next(int s, bit m);
    return (int'(m) << 1) | (s >> 1);
  endfunction

  function automatic metrics_t ref_start();
    metrics_t r;
    for (int s = 0; s < 4; s++) begin
      r.pm[s]  = 0;
      r.act[s] = (s == 0);
    end
    return r;
  endfunction

  // One trellis step: new metrics, decisions, pruned and compare counts.
  function automatic void ref_step(input metrics_t cur, input int rx, input int thr,
                                   output metrics_t nxt, output bit dec [4],
                                   output int npruned, output int ncmp);
    int best;
    int cand [4];
    bit cact [4];
    best = 1 << 30;
    ncmp = 0;
    npruned = 0;
    for (int d = 0; d < 4; d++) begin
      cand[d] = 0;
      cact[d] = 0;
      dec[d]  = 0;
      // predecessors of d = {m,S1} are {S1,0} and {S1,1}
      for (int b = 0; b < 2; b++) begin
        int ps, v;
        ps = ((d & 1) << 1) | b;
        if (!cur.act[ps]) continue;
        v = cur.pm[ps] + $countones(ref_code(ps, bit'(d >> 1)) ^ rx);
        if (!cact[d] || v < cand[d]) begin
          cand[d] = v;
          dec[d]  = bit'(b);
        end
        if (cact[d]) ncmp++;
        cact[d] = 1;
      end
      if (cact[d] && cand[d] < best) best = cand[d];
    end
    for (int d = 0; d < 4; d++) begin
      nxt.act[d] = cact[d] && (cand[d] - best <= thr);
      nxt.pm[d]  = nxt.act[d] ? cand[d] : 0;
      if (cact[d] && !nxt.act[d]) npruned++;
    end
  endfunction

  // Decode len received symbols rx[0..len-1] starting in state 00.
  function automatic void ref_decode(input int rx [MAXLEN], input int len, input int thr,
                                     output bit msg [MAXLEN], output int pruned_total);
    metrics_t m;
    bit dec_hist [MAXLEN][4];
    int np, nc, best, st;
    bit d4 [4];
    m = ref_start();
    pruned_total = 0;
    for (int t = 0; t < len; t++) begin
      metrics_t n;
      ref_step(m, rx[t], thr, n, d4, np, nc);
      dec_hist[t] = d4;
      pruned_total += np;
      m = n;
    end
    best = 1 << 30;
    st = 0;
    for (int s = 3; s >= 0; s--)
      if (m.act[s] && m.pm[s] <= best) begin
        best = m.pm[s];
        st = s;
      end
    for (int t = len - 1; t >= 0; t--) begin
      msg[t] = bit'(st >> 1);
      st = ((st & 1) << 1) | int'(dec_hist[t][st]);
    end
  endfunction

endpackage
