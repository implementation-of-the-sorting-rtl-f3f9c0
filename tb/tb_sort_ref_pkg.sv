// tb_sort_ref_pkg: reference model for the sorter testbenches.
//
// best_k() finds the k best of a list of values by repeated linear search for
// the maximum, the way one would do it in software: a larger value wins, and
// among equal values the later position wins. It shares no code with the RTL.
package tb_sort_ref_pkg;

  function automatic void best_k(input  int unsigned v[],
                                 input  int          k,
                                 output int          idx[]);
    bit taken[];
    taken = new[v.size()];
    idx   = new[k];
    for (int r = 0; r < k; r++) begin
      int best;
      best = -1;
      for (int i = 0; i < v.size(); i++) begin
        if (!taken[i] && (best < 0 || v[i] >= v[best])) best = i;
      end
      idx[r] = best;
      if (best >= 0) taken[best] = 1'b1;
    end
  endfunction

endpackage
