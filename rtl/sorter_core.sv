// sorter_core: single-chip sorter that finds the K best of N patterns and
// outputs them in descending order of rank, with their addresses.
//
// How it works. All N patterns are latched in the input register on the same
// clock edge. Every pair is then compared in parallel (sorter_cmp_matrix),
// the comparison results are turned into K one-hot select vectors
// (sorter_rank_select), and K one-hot multiplexers (sorter_onehot_mux) put
// the address, and the pattern, of the 1st, 2nd, .. Kth best onto the outputs,
// which are latched in the output register. A larger pattern value ranks
// higher; among equal patterns the one at the larger input position ranks
// higher. With EXT_ADDR = 0 the address of input i is the constant i (the
// "encoded addresses" of the sorter); with EXT_ADDR = 1 each input brings its
// own address, latched together with its pattern.
//
// Timing. LATENCY is the number of clocks from the edge that latches the
// inputs to the edge that loads the output register; a new set of patterns can
// be applied on every clock. LATENCY = 1 has no register between the input and
// output registers. Higher latencies insert intermediate registers, in this
// order: after the comparisons (2), on the half counts inside the selection
// (3), and after the select vectors (4). The published latencies are 1, 2 and
// 4 clocks; where the intermediate registers sit is this design's choice.
//
// Interface: in_pat[N], in_addr[N] (used only when EXT_ADDR = 1) in;
// out_addr[K], out_pat[K] out, index 0 being the best. All registers use the
// active-low asynchronous reset rst_n and clear to zero.
module sorter_core
  import sorter_pkg::*;
#(
  parameter int unsigned N        = 18,   // number of input patterns
  parameter int unsigned K        = 3,    // number of best patterns output
  parameter int unsigned PW       = 8,    // bits per pattern
  parameter int unsigned AW       = 5,    // bits per address
  parameter bit          EXT_ADDR = 1'b0, // addresses come with the patterns
  parameter int unsigned LATENCY  = 1     // clocks from input to output latch, 1..4
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic [PW-1:0] in_pat  [N],
  input  logic [AW-1:0] in_addr [N],
  output logic [AW-1:0] out_addr [K],
  output logic [PW-1:0] out_pat  [K]
);

  localparam int unsigned NC = num_cmp(N);
  localparam int unsigned DW = PW + AW;   // pattern and address carried together

  if (LATENCY < 1 || LATENCY > 4) begin : g_bad_latency
    $error("sorter_core: LATENCY must be 1..4");
  end
  if (!EXT_ADDR && (N > (1 << AW))) begin : g_bad_aw
    $error("sorter_core: AW too small for N internal addresses");
  end

  // ---------------------------------------------------------------- input FF
  logic [PW-1:0] pat_q  [N];
  logic [AW-1:0] addr_q [N];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int unsigned i = 0; i < N; i++) pat_q[i] <= '0;
    end else begin
      pat_q <= in_pat;
    end
  end

  if (EXT_ADDR) begin : g_ext_addr
    always_ff @(posedge clk or negedge rst_n) begin
      if (!rst_n) begin
        for (int unsigned i = 0; i < N; i++) addr_q[i] <= '0;
      end else begin
        addr_q <= in_addr;
      end
    end
  end else begin : g_enc_addr
    // Encoded addresses: input i has address i.
    for (genvar i = 0; i < N; i++) begin : g_a
      assign addr_q[i] = AW'(i);
    end
  end

  // Word carried to the multiplexers: {pattern, address}.
  logic [DW-1:0] word0 [N];
  for (genvar i = 0; i < N; i++) begin : g_word
    assign word0[i] = {pat_q[i], addr_q[i]};
  end

  // ------------------------------------------------------------ comparisons
  logic [NC-1:0] cmp_d, cmp_q;
  logic [DW-1:0] word1 [N];

  sorter_cmp_matrix #(.N(N), .PW(PW)) u_cmp (
    .pat (pat_q),
    .cmp (cmp_d)
  );

  if (LATENCY >= 2) begin : g_cmp_reg
    always_ff @(posedge clk or negedge rst_n) begin
      if (!rst_n) begin
        cmp_q <= '0;
        for (int unsigned i = 0; i < N; i++) word1[i] <= '0;
      end else begin
        cmp_q <= cmp_d;
        word1 <= word0;
      end
    end
  end else begin : g_cmp_comb
    assign cmp_q = cmp_d;
    assign word1 = word0;
  end

  // -------------------------------------------------------------- selection
  logic [N-1:0]  sel_d [K];
  logic [N-1:0]  sel_q [K];
  logic [DW-1:0] word2 [N];
  logic [DW-1:0] word3 [N];

  sorter_rank_select #(.N(N), .K(K), .SPLIT_REG(LATENCY >= 3)) u_sel (
    .clk   (clk),
    .rst_n (rst_n),
    .cmp   (cmp_q),
    .sel   (sel_d)
  );

  if (LATENCY >= 3) begin : g_cnt_reg
    // Payload follows the half-count register inside the selection.
    always_ff @(posedge clk or negedge rst_n) begin
      if (!rst_n) begin
        for (int unsigned i = 0; i < N; i++) word2[i] <= '0;
      end else begin
        word2 <= word1;
      end
    end
  end else begin : g_cnt_comb
    assign word2 = word1;
  end

  if (LATENCY >= 4) begin : g_sel_reg
    always_ff @(posedge clk or negedge rst_n) begin
      if (!rst_n) begin
        for (int unsigned r = 0; r < K; r++) sel_q[r] <= '0;
        for (int unsigned i = 0; i < N; i++) word3[i] <= '0;
      end else begin
        sel_q <= sel_d;
        word3 <= word2;
      end
    end
  end else begin : g_sel_comb
    assign sel_q = sel_d;
    assign word3 = word2;
  end

  // ---------------------------------------------------- multiplexers, out FF
  logic [DW-1:0] best [K];

  for (genvar r = 0; r < K; r++) begin : g_mux
    sorter_onehot_mux #(.N(N), .W(DW)) u_mux (
      .data (word3),
      .sel  (sel_q[r]),
      .out  (best[r])
    );
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int unsigned r = 0; r < K; r++) begin
        out_addr[r] <= '0;
        out_pat[r]  <= '0;
      end
    end else begin
      for (int unsigned r = 0; r < K; r++) begin
        out_addr[r] <= best[r][AW-1:0];
        out_pat[r]  <= best[r][DW-1:AW];
      end
    end
  end

  // --------------------------------------------------------------- checks
  // Once every pipeline register holds data computed from latched inputs,
  // each select vector must pick exactly one pattern.
  logic [2:0] fill;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)                   fill <= '0;
    else if (fill < 3'(LATENCY))  fill <= fill + 3'd1;
  end

  for (genvar r = 0; r < K; r++) begin : g_chk
    if (r < N) begin : g_onehot
      a_sel_onehot: assert property (@(posedge clk) disable iff (!rst_n)
        (fill == 3'(LATENCY)) |-> $onehot(sel_q[r]))
        else $error("sorter_core: select vector %0d is not one-hot", r);
    end
  end

endmodule
