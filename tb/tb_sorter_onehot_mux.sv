// tb_sorter_onehot_mux: self-checking testbench for sorter_onehot_mux at its
// default size (18 words of 5 bits).
//
// For random data it selects every input position in turn with a one-hot
// select and checks that exactly that word appears, and checks that an
// all-zero select gives zero. Combinational: checked 1 time unit after each
// change.
module tb_sorter_onehot_mux;
  localparam int N = 18, W = 5;

  logic [W-1:0] data [N];
  logic [N-1:0] sel;
  logic [W-1:0] out;
  int checks = 0, failures = 0;

  sorter_onehot_mux #(.N(N), .W(W)) dut (.data, .sel, .out);

  initial begin
    for (int t = 0; t < 200; t++) begin
      for (int i = 0; i < N; i++) data[i] = W'($urandom);
      for (int i = 0; i < N; i++) begin
        sel = N'(1) << i;
        #1;
        checks++;
        if (out != data[i]) failures++;
      end
      sel = '0;
      #1;
      checks++;
      if (out != '0) failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    $display("watchdog: testbench did not finish");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end
endmodule
