// sorter_rank_select: turns the pairwise comparison results into K one-hot
// select vectors, one per output rank ("select first best", "second best", ...).
//
// For each pattern i the block counts how many other patterns rank above it:
// pattern j > i beats i when its comparison bit is 1, pattern j < i beats i
// when the bit of (j, i) is 0. Because ties are broken by address the
// comparisons form a strict order, so exactly one pattern has count r for each
// r < N, and sel[r][i] = (count of i == r) is one-hot for every r < K.
// Counts saturate at K, which is all the selection needs.
//
// The count is split in two halves of the opponents (j < N/2 and j >= N/2).
// With SPLIT_REG = 1 the two half counts are registered, which puts one
// pipeline stage inside the selection; the 4-of-36 scheme uses this to reach
// its four-clock latency. How the selection is built and where that register
// sits are this implementation's choices: the method only fixes that the
// select signals (K x N of them) are derived from the comparison results.
//
// Interface: cmp[N(N-1)/2] in, sel[K][N] out. Combinational when SPLIT_REG = 0
// (clk and rst_n then unused); otherwise one clock from cmp to sel, with the
// half counts cleared by the active-low asynchronous reset.
module sorter_rank_select
  import sorter_pkg::*;
#(
  parameter int unsigned N         = 18,  // number of patterns
  parameter int unsigned K         = 3,   // number of best patterns selected
  parameter bit          SPLIT_REG = 1'b0 // register the half counts
) (
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic [num_cmp(N)-1:0] cmp,
  output logic [N-1:0]          sel [K]
);

  localparam int unsigned CW   = $clog2(K + 1);
  localparam int unsigned HALF = N / 2;

  // beat[i][j]: pattern j ranks above pattern i.
  logic [N-1:0] beat [N];

  always_comb begin
    for (int unsigned i = 0; i < N; i++) begin
      for (int unsigned j = 0; j < N; j++) begin
        if (j > i)      beat[i][j] = cmp[cmp_index(i, j, N)];
        else if (j < i) beat[i][j] = ~cmp[cmp_index(j, i, N)];
        else            beat[i][j] = 1'b0;
      end
    end
  end

  // Saturating half counts.
  logic [CW-1:0] cnt_lo_d [N], cnt_hi_d [N];
  logic [CW-1:0] cnt_lo_q [N], cnt_hi_q [N];

  always_comb begin
    for (int unsigned i = 0; i < N; i++) begin
      int unsigned lo, hi;
      lo = 0;
      hi = 0;
      for (int unsigned j = 0; j < N; j++) begin
        if (j < HALF) lo = sat_add(lo, int'(beat[i][j]), K);
        else          hi = sat_add(hi, int'(beat[i][j]), K);
      end
      cnt_lo_d[i] = CW'(lo);
      cnt_hi_d[i] = CW'(hi);
    end
  end

  if (SPLIT_REG) begin : g_reg
    always_ff @(posedge clk or negedge rst_n) begin
      if (!rst_n) begin
        for (int unsigned i = 0; i < N; i++) begin
          cnt_lo_q[i] <= '0;
          cnt_hi_q[i] <= '0;
        end
      end else begin
        cnt_lo_q <= cnt_lo_d;
        cnt_hi_q <= cnt_hi_d;
      end
    end
  end else begin : g_comb
    assign cnt_lo_q = cnt_lo_d;
    assign cnt_hi_q = cnt_hi_d;
  end

  always_comb begin
    for (int unsigned i = 0; i < N; i++) begin
      int unsigned total;
      total = sat_add(int'(cnt_lo_q[i]), int'(cnt_hi_q[i]), K);
      for (int unsigned r = 0; r < K; r++) sel[r][i] = (total == r);
    end
  end

endmodule
