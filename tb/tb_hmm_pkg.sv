// tb_hmm_pkg: reference path scoring for the testbenches.
//
// Cost tables are passed flattened as dynamic arrays of real numbers:
// init[s], trans[p*N+s] (from state p to state s), emis[t*N+s]. path_cost()
// scores a state sequence the way the decoder defines a chromosome's cost:
// emis + init at the first frame, emis + trans afterwards. viterbi() gives
// the cheapest cost over all state sequences by dynamic programming, the
// bound no decoded path can beat.
package tb_hmm_pkg;
  localparam int N = 6;

  function automatic real gene_cost(real init[], real trans[], real emis[], int t, int sp, int s);
    if (t == 0) return emis[s] + init[s];
    return emis[t * N + s] + trans[sp * N + s];
  endfunction

  function automatic real path_cost(real init[], real trans[], real emis[], int path[]);
    real c;
    c = 0.0;
    for (int t = 0; t < path.size(); t++)
      c += gene_cost(init, trans, emis, t, (t == 0) ? 0 : path[t - 1], path[t]);
    return c;
  endfunction

  function automatic real viterbi(real init[], real trans[], real emis[], int T);
    real d [N], nd [N], best, v;
    for (int s = 0; s < N; s++) d[s] = emis[s] + init[s];
    for (int t = 1; t < T; t++) begin
      for (int s = 0; s < N; s++) begin
        best = 1.0e300;
        for (int p = 0; p < N; p++) begin
          v = d[p] + trans[p * N + s];
          if (v < best) best = v;
        end
        nd[s] = best + emis[t * N + s];
      end
      d = nd;
    end
    best = 1.0e300;
    for (int s = 0; s < N; s++) if (d[s] < best) best = d[s];
    return best;
  endfunction
endpackage
