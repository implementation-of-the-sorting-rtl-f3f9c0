// tb_sorter_rank_select: self-checking testbench for sorter_rank_select.
//
// Two instances: the default one (18 patterns, 3 best, combinational) and the
// one used by the 4-of-36 scheme (36 patterns, 4 best, half counts
// registered, one clock). Each frame of patterns is turned into comparison
// bits here (bit for pair (i,j), i < j, set when pattern j >= pattern i), and
// every select vector is checked against the one-hot position of the r-th
// best found by tb_sort_ref_pkg. The registered instance is checked one clock
// after its frame is applied.
module tb_sorter_rank_select;
  import tb_sort_ref_pkg::*;
  localparam int NA = 18, KA = 3, NB = 36, KB = 4;
  localparam int NCA = NA * (NA - 1) / 2, NCB = NB * (NB - 1) / 2;

  logic clk = 1'b0, rst_n = 1'b0;
  logic [NCA-1:0] cmp_a;
  logic [NCB-1:0] cmp_b;
  logic [NA-1:0]  sel_a [KA];
  logic [NB-1:0]  sel_b [KB];
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  sorter_rank_select #(.N(NA), .K(KA)) dut_a (
    .clk, .rst_n, .cmp(cmp_a), .sel(sel_a)
  );
  sorter_rank_select #(.N(NB), .K(KB), .SPLIT_REG(1'b1)) dut_b (
    .clk, .rst_n, .cmp(cmp_b), .sel(sel_b)
  );

  // Random frame of n values; mode 1 gives many ties.
  function automatic void frame(input int n, input int mode, output int unsigned v[]);
    v = new[n];
    for (int i = 0; i < n; i++) v[i] = (mode == 1) ? $urandom_range(3, 0) : $urandom_range(127, 0);
  endfunction

  function automatic void to_cmp(input int unsigned v[], output bit c[]);
    int p;
    c = new[v.size() * (v.size() - 1) / 2];
    p = 0;
    for (int i = 0; i < v.size(); i++)
      for (int j = i + 1; j < v.size(); j++) c[p++] = (v[j] >= v[i]);
  endfunction

  initial begin
    int unsigned va[], vb[];
    int ia[], ib[];
    bit ca[], cb[];
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int t = 0; t < 1000; t++) begin
      frame(NA, t % 2, va);
      frame(NB, t % 2, vb);
      to_cmp(va, ca);
      to_cmp(vb, cb);
      for (int p = 0; p < NCA; p++) cmp_a[p] = ca[p];
      for (int p = 0; p < NCB; p++) cmp_b[p] = cb[p];
      best_k(va, KA, ia);
      best_k(vb, KB, ib);
      #1;
      for (int r = 0; r < KA; r++) begin
        checks++;
        if (sel_a[r] != (NA'(1) << ia[r])) failures++;
      end
      @(negedge clk);
      for (int r = 0; r < KB; r++) begin
        checks++;
        if (sel_b[r] != (NB'(1) << ib[r])) begin
          failures++;
          if (failures <= 10) $display("MISMATCH 36-input rank %0d: %h expected bit %0d", r, sel_b[r], ib[r]);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (1200) @(posedge clk);
    $display("watchdog: testbench did not finish");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end
endmodule
