// tb_sort_3of18: self-checking testbench for sort_3of18.
//
// Runs the 3-of-18 sorter at its own sizes (18 x 8-bit in, 3 x 5-bit out, 1 clock).
// sorter_stream_check drives a new random frame every clock for 2000 clocks and
// compares each ranked output with a software reference 1 clock(s) later,
// then measures the latency directly. Ends with a TB_RESULT line; a watchdog
// stops it with a failure if it hangs.
module tb_sort_3of18;
  localparam int N = 18, K = 3, PW = 8, AW = 5, LAT = 1;

  logic          clk = 1'b0;
  logic          rst_n = 1'b0;
  logic [PW-1:0] pat  [N];
  logic [AW-1:0] addr [N];
  logic [AW-1:0] best_addr [K];
  logic [PW-1:0] best_pat  [K];
  int            checks, failures, ties, stream_cycles, latency_seen;
  logic          done;

  always #5 clk = ~clk;

  sort_3of18 dut (.clk, .rst_n, .pat, .best_addr);
  for (genvar r = 0; r < K; r++) begin : g_bp
    assign best_pat[r] = '0;
  end

  sorter_stream_check #(
    .N(N), .K(K), .PW(PW), .AW(AW), .LAT(LAT), .EXT(0), .CPAT(0), .NCYC(2000)
  ) u_chk (
    .clk, .rst_n, .pat, .addr, .best_addr, .best_pat,
    .checks, .failures, .ties, .stream_cycles, .latency_seen, .done
  );

  initial begin
    repeat (3) @(negedge clk);
    rst_n <= 1'b1;
    wait (done);
    if (ties == 0) begin
      failures++;
      $display("no frame with tied patterns was seen");
    end
    $display("frames=%0d tied_frames=%0d latency=%0d", stream_cycles, ties, latency_seen);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2000 + 200) @(posedge clk);
    $display("watchdog: testbench did not finish");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end
endmodule
