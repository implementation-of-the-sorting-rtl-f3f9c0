// sort_3of18: "3 objects out of 18" sorter, meant for a muon port card.
//
// Takes 18 unranked 8-bit patterns every clock and outputs the 5-bit
// addresses of the three best, in descending order of rank: 144 input and 15
// output pins besides the clock. The address of a pattern is its input
// position 0..17, assigned inside the chip. A larger pattern ranks higher; of
// equal patterns the one at the larger position ranks higher.
//
// Structure (sorter_core): input register, the 153 pairwise comparisons,
// three select vectors of 18 bits, three address multiplexers, output
// register. Latency is one clock: inputs latched on edge t appear as addresses
// after edge t+1. Sizes and latency follow the published scheme; the 0-based
// address encoding and the asynchronous active-low reset are this design's
// choices.
module sort_3of18
  import sorter_pkg::*;
#(
  parameter int unsigned N       = 18,  // input patterns
  parameter int unsigned K       = 3,  // best patterns selected
  parameter int unsigned PW      = 8,  // bits per pattern
  parameter int unsigned AW      = 5,  // bits per output address
  parameter int unsigned LATENCY = 1   // clocks from input latch to output latch
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic [PW-1:0] pat      [N],  // unranked input patterns
  output logic [AW-1:0] best_addr [K]  // best_addr[0] = address of the best
);

  logic [AW-1:0] unused_addr [N];
  logic [PW-1:0] best_pat    [K];   // not brought out: only addresses leave the chip

  for (genvar i = 0; i < N; i++) begin : g_tie
    assign unused_addr[i] = '0;
  end

  sorter_core #(
    .N(N), .K(K), .PW(PW), .AW(AW), .EXT_ADDR(1'b0), .LATENCY(LATENCY)
  ) u_core (
    .clk      (clk),
    .rst_n    (rst_n),
    .in_pat   (pat),
    .in_addr  (unused_addr),
    .out_addr (best_addr),
    .out_pat  (best_pat)
  );

endmodule
