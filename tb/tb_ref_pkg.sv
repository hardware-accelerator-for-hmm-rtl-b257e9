// tb_ref_pkg: behavioural reference model of the recognizer arithmetic,
// written independently of the RTL for the testbenches.
//
// The approximate adders are modelled block by block with integer
// arithmetic: a block's carry-out is bit W of the block sum, its propagate is
// "a ^ b is all ones", and the carry into block k+1 is taken from block k-1
// when block k propagates, else from block k; the two lowest blocks get 0.
package tb_ref_pkg;

  // Generic block approximate adder; bw lists block widths from the LSB.
  function automatic longint unsigned ref_approx_add(longint unsigned a, longint unsigned b,
                                                     int unsigned bw[6]);
    longint unsigned res = 0;
    int unsigned     lo  = 0;
    bit              co [6];
    bit              pp [6];
    for (int k = 0; k < 6; k++) begin
      longint unsigned m  = (64'd1 << bw[k]) - 1;
      longint unsigned ab = (a >> lo) & m;
      longint unsigned bb = (b >> lo) & m;
      longint unsigned s;
      bit              cin;
      co[k] = ((ab + bb) >> bw[k]) & 1;
      pp[k] = ((ab ^ bb) == m);
      if (k < 2) cin = 0;
      else       cin = pp[k-1] ? co[k-2] : co[k-1];
      s   = (ab + bb + longint'(cin)) & m;
      res = res | (s << lo);
      lo  = lo + bw[k];
    end
    return res;
  endfunction

  function automatic logic [15:0] ref_add16(logic [15:0] a, logic [15:0] b, bit approx);
    int unsigned bw[6] = '{2, 2, 2, 2, 4, 4};
    if (approx) return 16'(ref_approx_add(a, b, bw));
    return a + b;
  endfunction

  function automatic logic [23:0] ref_add24(logic [23:0] a, logic [23:0] b, bit approx);
    int unsigned bw[6] = '{4, 4, 4, 4, 4, 4};
    if (approx) return 24'(ref_approx_add(a, b, bw));
    return a + b;
  endfunction

  // One multiply-accumulate term sigma * (o - mu)^2.
  function automatic logic [47:0] ref_term(logic [15:0] o, logic [15:0] mu, logic [15:0] sigma,
                                           bit approx);
    logic [15:0] d = ref_add16(o, 16'(-mu), approx);
    longint      ds = longint'($signed(d));
    longint unsigned sq = longint'(ds * ds) & 64'hFFFF_FFFF;
    return 48'(sq * longint'(sigma));
  endfunction

  // logb from the accumulated sum: upper half passed, lower half + omega.
  function automatic logic [47:0] ref_logb(logic [47:0] acc, logic [47:0] omega);
    logic [23:0] lo = acc[23:0] + omega[23:0];
    return {acc[47:24], lo};
  endfunction

  // delta + a with the upper half kept and a 24-bit lower addition.
  function automatic logic [47:0] ref_trans(logic [47:0] d, logic [47:0] a, bit approx);
    return {d[47:24], ref_add24(d[23:0], a[23:0], approx)};
  endfunction

  function automatic logic [47:0] ref_min(logic [47:0] a, logic [47:0] b);
    return (b < a) ? b : a;
  endfunction

  localparam int MAX_T = 16;  // longest utterance the testbenches use

  // One HMM's model and a behavioural log-Viterbi over an utterance.
  class ref_hmm;
    logic [15:0] mu    [3][39];
    logic [15:0] sigma [3][39];
    logic [47:0] omega [3];
    logic [47:0] omega0[3];
    logic [47:0] a_self[3];
    logic [47:0] a_pred[3];
    logic [47:0] delta [3];
    int          pred_wins = 0;   // recursion steps where state j-1 was the better origin

    // Random model with the value ranges of scaled MFCC statistics.
    function void randomize_model(int unsigned mu_off);
      for (int s = 0; s < 3; s++) begin
        for (int d = 0; d < 39; d++) begin
          mu[s][d]    = 16'($signed(16'(($urandom % 3001) + mu_off)) - 16'sd1500);
          sigma[s][d] = 16'(1 + $urandom % 800);
        end
        omega[s]  = {24'h0, 24'($urandom)};
        omega0[s] = (s == 0) ? omega[s] : omega[s] + 48'h7FFF;
        a_self[s] = {24'h0, 24'($urandom % (1 << 20))};
        a_pred[s] = {24'h0, 24'($urandom % (1 << 20))};
      end
    endfunction

    // Runs T frames and returns the likelihood cost (min over the states).
    function logic [47:0] run(logic [15:0] frames [MAX_T][39], int T, bit approx);
      logic [47:0] nd [3];
      for (int t = 0; t < T; t++) begin
        for (int s = 0; s < 3; s++) begin
          logic [47:0] acc = 0, lb, best;
          for (int d = 0; d < 39; d++) acc = acc + ref_term(frames[t][d], mu[s][d], sigma[s][d], approx);
          lb = ref_logb(acc, (t == 0) ? omega0[s] : omega[s]);
          if (t == 0) nd[s] = lb;
          else begin
            best = ref_trans(delta[s], a_self[s], approx);
            if (s > 0) begin
              logic [47:0] pv = ref_trans(delta[s-1], a_pred[s], approx);
              if (pv < best) pred_wins++;
              best = ref_min(pv, best);
            end
            nd[s] = best + lb;
          end
        end
        delta = nd;
      end
      return ref_min(ref_min(delta[0], delta[1]), delta[2]);
    endfunction
  endclass

endpackage
