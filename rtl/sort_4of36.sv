// sort_4of36: "4 objects out of 36" sorter, meant for a cathode-strip-chamber
// muon sorter.
//
// Takes 36 unranked 7-bit patterns every clock and outputs the 6-bit
// addresses of the four best, in descending order of rank: 252 input and 24
// output pins besides the clock. Addresses are the input positions 0..35,
// assigned inside the chip; ties go to the larger position.
//
// Structure (sorter_core): input register, 630 pairwise comparisons, then
// three intermediate registers (on the comparison results, on the half counts
// inside the selection, and on the four 36-bit select vectors), four address
// multiplexers and the output register. Latency is four clocks, with a new set
// of patterns accepted every clock. Sizes and the four-clock latency follow
// the published scheme; where the intermediate registers sit is this design's
// choice.
module sort_4of36
  import sorter_pkg::*;
#(
  parameter int unsigned N       = 36,  // input patterns
  parameter int unsigned K       = 4,  // best patterns selected
  parameter int unsigned PW      = 7,  // bits per pattern
  parameter int unsigned AW      = 6,  // bits per output address
  parameter int unsigned LATENCY = 4   // clocks from input latch to output latch
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
