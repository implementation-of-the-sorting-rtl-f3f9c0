// sorter_stream_check: stimulus generator and checker for one K-of-N sorter.
//
// After reset it drives a new set of patterns (and, with EXT = 1, addresses)
// on every falling clock edge for NCYC clocks, in four kinds of frames: full
// random values, values 0..3 (many ties), all patterns equal, and mostly zero
// with a few random entries. For every frame latched on a rising edge it works
// out the expected ranked result with tb_sort_ref_pkg and compares it with the
// sorter outputs LAT clocks later. It checks that the outputs are zero while
// in reset. At the end it measures the latency directly: after all-zero
// frames one frame with a single non-zero pattern at position 0 is applied,
// and the number of clocks until that address ranks first must equal LAT.
// Counters of checks, failures, frames with ties and clocks of back-to-back
// input are outputs; done goes high when it has finished.
module sorter_stream_check
  import tb_sort_ref_pkg::*;
#(
  parameter int N    = 18,
  parameter int K    = 3,
  parameter int PW   = 8,
  parameter int AW   = 5,
  parameter int LAT  = 1,
  parameter bit EXT  = 1'b0,  // addresses are inputs (else address = position)
  parameter bit CPAT = 1'b0,  // the sorter outputs the best patterns too
  parameter int NCYC = 1000
) (
  input  logic          clk,
  input  logic          rst_n,
  output logic [PW-1:0] pat  [N],
  output logic [AW-1:0] addr [N],
  input  logic [AW-1:0] best_addr [K],
  input  logic [PW-1:0] best_pat  [K],
  output int            checks,
  output int            failures,
  output int            ties,
  output int            stream_cycles,
  output int            latency_seen,
  output logic          done
);

  localparam int HIST = 64;

  int unsigned exp_addr [HIST][K];
  int unsigned exp_pat  [HIST][K];
  int          cyc;        // rising edges since reset release
  bit          checking;   // the stream phase is running

  initial begin
    checks = 0; failures = 0; ties = 0; stream_cycles = 0;
    latency_seen = -1; done = 1'b0; cyc = 0; checking = 1'b0;
    for (int i = 0; i < N; i++) begin
      pat[i]  = '0;
      addr[i] = EXT ? AW'(i) : '0;
    end
  end

  // Reference result for the frame being latched on this edge.
  always @(posedge clk) begin
    if (rst_n) begin
      int unsigned v[];
      int          idx[];
      v = new[N];
      for (int i = 0; i < N; i++) v[i] = pat[i];
      best_k(v, K + 1 <= N ? K + 1 : K, idx);
      for (int r = 0; r < K; r++) begin
        exp_addr[cyc % HIST][r] = EXT ? addr[idx[r]] : idx[r];
        exp_pat [cyc % HIST][r] = pat[idx[r]];
      end
      if (checking) begin
        bit tie;
        tie = 1'b0;
        for (int r = 0; r + 1 < idx.size(); r++)
          if (v[idx[r]] == v[idx[r+1]]) tie = 1'b1;
        if (tie) ties++;
        stream_cycles++;
      end
      cyc++;
    end
  end

  task automatic compare(input int m);
    for (int r = 0; r < K; r++) begin
      checks++;
      if (best_addr[r] != AW'(exp_addr[m % HIST][r]) ||
          (CPAT && best_pat[r] != PW'(exp_pat[m % HIST][r]))) begin
        failures++;
        if (failures <= 10)
          $display("MISMATCH N=%0d frame %0d rank %0d: addr %0d pat %0d, expected addr %0d pat %0d",
                   N, m, r, best_addr[r], best_pat[r], exp_addr[m % HIST][r],
                   exp_pat[m % HIST][r]);
      end
    end
  endtask

  initial begin
    // Outputs are cleared by reset.
    @(negedge clk);
    while (!rst_n) begin
      for (int r = 0; r < K; r++) begin
        checks++;
        if (best_addr[r] != '0 || (CPAT && best_pat[r] != '0)) failures++;
      end
      @(negedge clk);
    end
    // Stream phase: a new frame on every clock.
    checking = 1'b1;
    for (int t = 0; t < NCYC + LAT; t++) begin
      if (cyc - 1 - LAT >= 0) compare(cyc - 1 - LAT);
      if (t < NCYC) begin
        int mode;
        int unsigned same;
        mode = (t / 50) % 4;
        same = $urandom;
        for (int i = 0; i < N; i++) begin
          case (mode)
            0: pat[i] = PW'($urandom);
            1: pat[i] = PW'($urandom_range(3, 0));
            2: pat[i] = PW'(same);
            default: pat[i] = ($urandom_range(7, 0) == 0) ? PW'($urandom) : '0;
          endcase
          if (EXT) addr[i] = AW'($urandom);
        end
      end
      @(negedge clk);
    end
    checking = 1'b0;
    // Latency measurement.
    for (int i = 0; i < N; i++) begin
      pat[i]  = '0;
      addr[i] = EXT ? AW'(i) : '0;
    end
    if (EXT) addr[0] = AW'(N + 1);
    repeat (LAT + 2) @(negedge clk);
    pat[0] = PW'(1);
    @(negedge clk);
    pat[0] = '0;
    for (int d = 1; d <= LAT + 4; d++) begin
      if (best_addr[0] == (EXT ? AW'(N + 1) : AW'(0))) begin
        latency_seen = d - 1;  // edges after the one that latched the frame
        break;
      end
      @(negedge clk);
    end
    checks++;
    if (latency_seen != LAT) begin
      failures++;
      $display("LATENCY N=%0d: saw %0d clocks, expected %0d", N, latency_seen, LAT);
    end
    done = 1'b1;
  end

endmodule
