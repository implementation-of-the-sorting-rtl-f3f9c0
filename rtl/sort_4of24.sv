// sort_4of24: "4 objects out of 24" sorter, meant for a drift-tube muon
// sorter.
//
// Takes 24 unranked 7-bit patterns every clock and outputs the 5-bit
// addresses of the four best, in descending order of rank: 168 input and 20
// output pins besides the clock. Addresses are the input positions 0..23,
// assigned inside the chip; ties go to the larger position.
//
// Structure (sorter_core): input register, 276 pairwise comparisons, an
// intermediate register on the comparison results, four select vectors of
// 24 bits, four address multiplexers, output register. Latency is two clocks,
// with a new set of patterns accepted every clock. Sizes and the two-clock
// latency with an intermediate register follow the published scheme; placing
// that register after the comparisons is this design's choice.
module sort_4of24
  import sorter_pkg::*;
#(
  parameter int unsigned N       = 24,  // input patterns
  parameter int unsigned K       = 4,  // best patterns selected
  parameter int unsigned PW      = 7,  // bits per pattern
  parameter int unsigned AW      = 5,  // bits per output address
  parameter int unsigned LATENCY = 2   // clocks from input latch to output latch
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
