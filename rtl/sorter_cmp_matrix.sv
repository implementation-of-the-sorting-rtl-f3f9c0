// sorter_cmp_matrix: all pairwise comparisons of N patterns, in parallel.
//
// Every pair (i, j) with i < j is compared once, giving N(N-1)/2 result bits
// (28, 153, 276 and 630 for N = 8, 18, 24 and 36). Bit cmp[cmp_index(i,j,N)]
// is 1 when pattern j ranks above pattern i, i.e. pat[j] >= pat[i]: among
// equal patterns the one with the larger address ranks higher. Comparing all
// pairs at once, ahead of any selection, is the sorting method this block
// belongs to; the bit layout is defined in sorter_pkg.
//
// Interface: pat[N] in, cmp[N(N-1)/2] out. Purely combinational, no clock.
module sorter_cmp_matrix
  import sorter_pkg::*;
#(
  parameter int unsigned N  = 18,  // number of patterns
  parameter int unsigned PW = 8    // bits per pattern
) (
  input  logic [PW-1:0]          pat [N],
  output logic [num_cmp(N)-1:0]  cmp
);

  for (genvar i = 0; i < N; i++) begin : g_row
    for (genvar j = i + 1; j < N; j++) begin : g_col
      assign cmp[cmp_index(i, j, N)] = (pat[j] >= pat[i]);
    end
  end

endmodule
