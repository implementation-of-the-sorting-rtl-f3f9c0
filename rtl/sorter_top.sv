// sorter_top: the four sorting schemes side by side, each as it would sit in
// its own programmable-logic device.
//
//   mpc_*  "3 of 18": 18 x 8-bit patterns -> 3 x 5-bit addresses, 1 clock
//   rpc_*  "4 of 8" : 8 x (8-bit pattern + 8-bit address) -> 4 x (pattern +
//                     address), 1 clock
//   dt_*   "4 of 24": 24 x 7-bit patterns -> 4 x 5-bit addresses, 2 clocks
//   csc_*  "4 of 36": 36 x 7-bit patterns -> 4 x 6-bit addresses, 4 clocks
//
// All four share clk and the active-low asynchronous reset rst_n; each takes
// a new set of patterns on every clock and presents its results ranked, best
// first. The schemes are independent: no signal passes between them. In a
// system the output addresses would steer external registers holding the full
// objects, and the results would be latched outside on a clock shifted by half
// a period; both lie outside this RTL, so the outputs are plain ports.
module sorter_top
  import sorter_pkg::*;
(
  input  logic              clk,
  input  logic              rst_n,
  // 3 of 18
  input  logic [MPC_PW-1:0] mpc_pat       [MPC_N],
  output logic [MPC_AW-1:0] mpc_best_addr [MPC_K],
  // 4 of 8
  input  logic [RPC_PW-1:0] rpc_pat       [RPC_N],
  input  logic [RPC_AW-1:0] rpc_addr      [RPC_N],
  output logic [RPC_PW-1:0] rpc_best_pat  [RPC_K],
  output logic [RPC_AW-1:0] rpc_best_addr [RPC_K],
  // 4 of 24
  input  logic [DT_PW-1:0]  dt_pat        [DT_N],
  output logic [DT_AW-1:0]  dt_best_addr  [DT_K],
  // 4 of 36
  input  logic [CSC_PW-1:0] csc_pat       [CSC_N],
  output logic [CSC_AW-1:0] csc_best_addr [CSC_K]
);

  sort_3of18 u_mpc (
    .clk (clk), .rst_n (rst_n), .pat (mpc_pat), .best_addr (mpc_best_addr)
  );

  sort_4of8 u_rpc (
    .clk (clk), .rst_n (rst_n), .pat (rpc_pat), .addr (rpc_addr),
    .best_pat (rpc_best_pat), .best_addr (rpc_best_addr)
  );

  sort_4of24 u_dt (
    .clk (clk), .rst_n (rst_n), .pat (dt_pat), .best_addr (dt_best_addr)
  );

  sort_4of36 u_csc (
    .clk (clk), .rst_n (rst_n), .pat (csc_pat), .best_addr (csc_best_addr)
  );

endmodule
