// tb_sorter_top: end-to-end testbench of sorter_top, all four sorters at their
// published sizes (no parameter is overridden).
//
// One sorter_stream_check per scheme feeds its sorter a new frame of
// patterns every clock for NCYC clocks, all four at once, and checks every
// ranked output against a software reference at that scheme's latency
// (1, 1, 2 and 4 clocks), then measures each latency directly. It counts, per
// scheme, the mechanisms the design has and fails if one never happened:
// frames with tied patterns (tie broken by address), back-to-back frames (a
// new frame every clock), and, for the 4-of-8 sorter, supplied addresses that
// differ from the input position.
module tb_sorter_top;
  import sorter_pkg::*;

  localparam int NCYC = 3000;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic [MPC_PW-1:0] mpc_pat [MPC_N];
  logic [MPC_AW-1:0] mpc_addr_unused [MPC_N];
  logic [MPC_AW-1:0] mpc_best_addr [MPC_K];
  logic [MPC_PW-1:0] mpc_best_pat [MPC_K];
  logic [RPC_PW-1:0] rpc_pat [RPC_N];
  logic [RPC_AW-1:0] rpc_addr [RPC_N];
  logic [RPC_PW-1:0] rpc_best_pat [RPC_K];
  logic [RPC_AW-1:0] rpc_best_addr [RPC_K];
  logic [DT_PW-1:0]  dt_pat [DT_N];
  logic [DT_AW-1:0]  dt_addr_unused [DT_N];
  logic [DT_AW-1:0]  dt_best_addr [DT_K];
  logic [DT_PW-1:0]  dt_best_pat [DT_K];
  logic [CSC_PW-1:0] csc_pat [CSC_N];
  logic [CSC_AW-1:0] csc_addr_unused [CSC_N];
  logic [CSC_AW-1:0] csc_best_addr [CSC_K];
  logic [CSC_PW-1:0] csc_best_pat [CSC_K];

  for (genvar r = 0; r < MPC_K; r++) begin : g_m
    assign mpc_best_pat[r] = '0;
  end
  for (genvar r = 0; r < DT_K; r++) begin : g_d
    assign dt_best_pat[r] = '0;
  end
  for (genvar r = 0; r < CSC_K; r++) begin : g_c
    assign csc_best_pat[r] = '0;
  end

  sorter_top dut (
    .clk, .rst_n,
    .mpc_pat, .mpc_best_addr,
    .rpc_pat, .rpc_addr, .rpc_best_pat, .rpc_best_addr,
    .dt_pat, .dt_best_addr,
    .csc_pat, .csc_best_addr
  );

  int chk [4], fail [4], tie [4], strm [4], lat [4];
  logic done [4];
  localparam string NAME [4] = '{"3 of 18", "4 of 8", "4 of 24", "4 of 36"};
  localparam int    LATS [4] = '{MPC_LAT, RPC_LAT, DT_LAT, CSC_LAT};

  sorter_stream_check #(.N(MPC_N), .K(MPC_K), .PW(MPC_PW), .AW(MPC_AW), .LAT(MPC_LAT),
                        .EXT(1'b0), .CPAT(1'b0), .NCYC(NCYC)) u_mpc (
    .clk, .rst_n, .pat(mpc_pat), .addr(mpc_addr_unused), .best_addr(mpc_best_addr),
    .best_pat(mpc_best_pat), .checks(chk[0]), .failures(fail[0]), .ties(tie[0]),
    .stream_cycles(strm[0]), .latency_seen(lat[0]), .done(done[0]));
  sorter_stream_check #(.N(RPC_N), .K(RPC_K), .PW(RPC_PW), .AW(RPC_AW), .LAT(RPC_LAT),
                        .EXT(1'b1), .CPAT(1'b1), .NCYC(NCYC)) u_rpc (
    .clk, .rst_n, .pat(rpc_pat), .addr(rpc_addr), .best_addr(rpc_best_addr),
    .best_pat(rpc_best_pat), .checks(chk[1]), .failures(fail[1]), .ties(tie[1]),
    .stream_cycles(strm[1]), .latency_seen(lat[1]), .done(done[1]));
  sorter_stream_check #(.N(DT_N), .K(DT_K), .PW(DT_PW), .AW(DT_AW), .LAT(DT_LAT),
                        .EXT(1'b0), .CPAT(1'b0), .NCYC(NCYC)) u_dt (
    .clk, .rst_n, .pat(dt_pat), .addr(dt_addr_unused), .best_addr(dt_best_addr),
    .best_pat(dt_best_pat), .checks(chk[2]), .failures(fail[2]), .ties(tie[2]),
    .stream_cycles(strm[2]), .latency_seen(lat[2]), .done(done[2]));
  sorter_stream_check #(.N(CSC_N), .K(CSC_K), .PW(CSC_PW), .AW(CSC_AW), .LAT(CSC_LAT),
                        .EXT(1'b0), .CPAT(1'b0), .NCYC(NCYC)) u_csc (
    .clk, .rst_n, .pat(csc_pat), .addr(csc_addr_unused), .best_addr(csc_best_addr),
    .best_pat(csc_best_pat), .checks(chk[3]), .failures(fail[3]), .ties(tie[3]),
    .stream_cycles(strm[3]), .latency_seen(lat[3]), .done(done[3]));

  // Supplied addresses that differ from the input position, on the 4-of-8 sorter.
  int ext_addr_frames = 0;
  always @(posedge clk) begin
    if (rst_n) begin
      bit differs;
      differs = 1'b0;
      for (int i = 0; i < RPC_N; i++) if (rpc_addr[i] != RPC_AW'(i)) differs = 1'b1;
      if (differs) ext_addr_frames++;
    end
  end

  initial begin
    int checks, failures;
    repeat (3) @(negedge clk);
    rst_n <= 1'b1;
    wait (done[0] && done[1] && done[2] && done[3]);
    checks = 0;
    failures = 0;
    for (int s = 0; s < 4; s++) begin
      $display("%s: checks=%0d failures=%0d back_to_back_frames=%0d tied_frames=%0d latency=%0d (expected %0d)",
               NAME[s], chk[s], fail[s], strm[s], tie[s], lat[s], LATS[s]);
      checks += chk[s];
      failures += fail[s];
      checks += 2;
      if (tie[s] == 0) begin
        failures++;
        $display("%s: no tied frame", NAME[s]);
      end
      if (strm[s] < NCYC) begin
        failures++;
        $display("%s: frames were not back to back", NAME[s]);
      end
    end
    checks++;
    $display("4 of 8: frames with supplied addresses = %0d", ext_addr_frames);
    if (ext_addr_frames == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (NCYC + 300) @(posedge clk);
    $display("watchdog: testbench did not finish");
    $display("TB_RESULT checks=%0d failures=%0d", 1, 1);
    $finish;
  end
endmodule
