// sorter_onehot_mux: puts the word chosen by a one-hot select vector onto its
// output (the MUX1..MUXk of the sorter).
//
// out is the OR of all data words whose select bit is 1, so with a one-hot
// select it is exactly the selected word, and with no bit set it is zero. An
// AND-OR multiplexer is the simplest circuit that does the job; the sorting
// method names the multiplexers without giving their insides.
//
// Interface: data[N] words of W bits and sel[N] in, out[W] out.
// Combinational.
module sorter_onehot_mux #(
  parameter int unsigned N = 18,  // number of inputs
  parameter int unsigned W = 5    // word width
) (
  input  logic [W-1:0] data [N],
  input  logic [N-1:0] sel,
  output logic [W-1:0] out
);

  always_comb begin
    out = '0;
    for (int unsigned i = 0; i < N; i++) out |= data[i] & {W{sel[i]}};
  end

endmodule
