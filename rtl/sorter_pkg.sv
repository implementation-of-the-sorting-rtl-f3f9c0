// sorter_pkg: constants and helper functions shared by the K-of-N sorters.
//
// The sorters compare every pair of input patterns once. The results are kept
// in one flat vector of n(n-1)/2 bits; cmp_index() gives the bit position of
// the pair (i, j), i < j. That bit is 1 when pattern j ranks above pattern i,
// that is when pat[j] >= pat[i]: on equal values the pattern with the larger
// address (input position) wins, as the sorting method prescribes.
// sat_add() is the saturating adder used to count, per pattern, how many
// others rank above it, clipped at K (a pattern beaten K times cannot be among
// the K best). The flat pair ordering and the saturating counts are choices of
// this implementation.
package sorter_pkg;

  // Number of pairwise comparisons for n patterns: n(n-1)/2.
  function automatic int unsigned num_cmp(input int unsigned n);
    return n * (n - 1) / 2;
  endfunction

  // Bit position of the comparison between patterns i and j, with i < j < n.
  // Pairs are laid out row by row: (0,1) (0,2) .. (0,n-1) (1,2) ..
  function automatic int unsigned cmp_index(input int unsigned i,
                                            input int unsigned j,
                                            input int unsigned n);
    return i * n - (i * (i + 1)) / 2 + (j - i - 1);
  endfunction

  // a + b, clipped at limit.
  function automatic int unsigned sat_add(input int unsigned a,
                                          input int unsigned b,
                                          input int unsigned limit);
    return (a + b > limit) ? limit : a + b;
  endfunction

  // The four sorting schemes and their published sizes.
  localparam int unsigned MPC_N = 18, MPC_K = 3, MPC_PW = 8, MPC_AW = 5, MPC_LAT = 1;
  localparam int unsigned RPC_N = 8,  RPC_K = 4, RPC_PW = 8, RPC_AW = 8, RPC_LAT = 1;
  localparam int unsigned DT_N  = 24, DT_K  = 4, DT_PW  = 7, DT_AW  = 5, DT_LAT  = 2;
  localparam int unsigned CSC_N = 36, CSC_K = 4, CSC_PW = 7, CSC_AW = 6, CSC_LAT = 4;

endpackage
