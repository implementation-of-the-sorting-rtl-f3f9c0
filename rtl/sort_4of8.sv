// sort_4of8: "4 objects out of 8" sorter, meant for a resistive-plate-chamber
// sorting processor.
//
// Takes 8 unranked 8-bit patterns every clock, each with an 8-bit address
// supplied by the logic in front of the sorter, and outputs the four best
// patterns together with their addresses, in descending order of rank:
// (8+8)*8 = 128 input and (8+8)*4 = 64 output pins besides the clock. A
// larger pattern ranks higher; of equal patterns the one on the higher input
// position ranks higher (the position, not the supplied address, breaks the
// tie: this is this design's reading).
//
// Structure (sorter_core with EXT_ADDR = 1): input register for patterns and
// addresses, 28 pairwise comparisons, four select vectors of 8 bits, four
// multiplexers for pattern and address, output register. Latency is one
// clock. Sizes and latency follow the published scheme; the reset is this
// design's choice.
module sort_4of8
  import sorter_pkg::*;
#(
  parameter int unsigned N       = 8,  // input patterns
  parameter int unsigned K       = 4,  // best patterns selected
  parameter int unsigned PW      = 8,  // bits per pattern
  parameter int unsigned AW      = 8,  // bits per supplied address
  parameter int unsigned LATENCY = 1   // clocks from input latch to output latch
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic [PW-1:0] pat       [N],  // unranked input patterns
  input  logic [AW-1:0] addr      [N],  // address of each pattern
  output logic [PW-1:0] best_pat  [K],  // best_pat[0] = best pattern
  output logic [AW-1:0] best_addr [K]   // its address
);

  sorter_core #(
    .N(N), .K(K), .PW(PW), .AW(AW), .EXT_ADDR(1'b1), .LATENCY(LATENCY)
  ) u_core (
    .clk      (clk),
    .rst_n    (rst_n),
    .in_pat   (pat),
    .in_addr  (addr),
    .out_addr (best_addr),
    .out_pat  (best_pat)
  );

endmodule
