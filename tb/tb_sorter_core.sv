// tb_sorter_core: self-checking testbench for sorter_core.
//
// Runs the generic core in a configuration none of the four schemes uses: 12 x 4-bit patterns with supplied 6-bit addresses, 5 best, three-clock latency (registers after the comparisons and on the half counts).
// sorter_stream_check drives a new random frame every clock for 2000 clocks and
// compares each ranked output with a software reference 3 clock(s) later,
// then measures the latency directly. Ends with a TB_RESULT line; a watchdog
// stops it with a failure if it hangs.
module tb_sorter_core;
  localparam int N = 12, K = 5, PW = 4, AW = 6, LAT = 3;

  logic          clk = 1'b0;
  logic          rst_n = 1'b0;
  logic [PW-1:0] pat  [N];
  logic [AW-1:0] addr [N];
  logic [AW-1:0] best_addr [K];
  logic [PW-1:0] best_pat  [K];
  int            checks, failures, ties, stream_cycles, latency_seen;
  logic          done;

  always #5 clk = ~clk;

  sorter_core #(.N(N), .K(K), .PW(PW), .AW(AW), .EXT_ADDR(1'b1), .LATENCY(LAT)) dut (
    .clk, .rst_n, .in_pat(pat), .in_addr(addr), .out_addr(best_addr), .out_pat(best_pat)
  );

  sorter_stream_check #(
    .N(N), .K(K), .PW(PW), .AW(AW), .LAT(LAT), .EXT(1), .CPAT(1), .NCYC(2000)
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
