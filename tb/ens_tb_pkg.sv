// ens_tb_pkg: reference model shared by the ensemble testbenches.
//
// Computes, independently of the RTL, the decision of a set of base networks:
// the arg-max (first maximum) of one network's scores and the arg-max and
// value of the per-class score sum over the trusted networks.
package ens_tb_pkg;

  typedef int unsigned scores_t [10];

  function automatic int argmax(scores_t s);
    int best = 0;
    for (int k = 1; k < 10; k++) if (s[k] > s[best]) best = k;
    return best;
  endfunction

  // Returns the label; sum_out gets the winning sum.
  function automatic int ens_decide(scores_t s [4], bit trusted [4], int n,
                                    output int unsigned sum_out);
    int unsigned sums [10];
    int best = 0;
    for (int k = 0; k < 10; k++) begin
      sums[k] = 0;
      for (int i = 0; i < n; i++) if (trusted[i]) sums[k] += s[i][k];
    end
    for (int k = 1; k < 10; k++) if (sums[k] > sums[best]) best = k;
    sum_out = sums[best];
    return best;
  endfunction

  // Random scores whose maximum is at class `peak` (peak < 0: no preference).
  function automatic scores_t rand_scores(int peak);
    scores_t s;
    for (int k = 0; k < 10; k++) s[k] = $urandom_range(0, 150);
    if (peak >= 0) s[peak] = $urandom_range(200, 255);
    return s;
  endfunction

endpackage
