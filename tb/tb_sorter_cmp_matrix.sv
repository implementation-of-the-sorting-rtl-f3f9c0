// tb_sorter_cmp_matrix: self-checking testbench for sorter_cmp_matrix at its
// default size (18 x 8-bit patterns, 153 comparison bits).
//
// Applies random frames, frames with values 0..3 (many ties) and all-equal
// frames, and checks every comparison bit against pat[j] >= pat[i], walking
// the pairs (0,1) (0,2) .. (1,2) .. in order with its own running index.
// Combinational block: each frame is checked 1 time unit after it is applied.
module tb_sorter_cmp_matrix;
  localparam int N = 18, PW = 8, NC = N * (N - 1) / 2;

  logic [PW-1:0] pat [N];
  logic [NC-1:0] cmp;
  int checks = 0, failures = 0, tie_bits = 0;

  sorter_cmp_matrix #(.N(N), .PW(PW)) dut (.pat, .cmp);

  initial begin
    for (int t = 0; t < 600; t++) begin
      int unsigned same;
      same = $urandom;
      for (int i = 0; i < N; i++)
        case (t % 3)
          0: pat[i] = PW'($urandom);
          1: pat[i] = PW'($urandom_range(3, 0));
          default: pat[i] = PW'(same);
        endcase
      #1;
      begin
        int p;
        p = 0;
        for (int i = 0; i < N; i++)
          for (int j = i + 1; j < N; j++) begin
            checks++;
            if (pat[i] == pat[j]) tie_bits++;
            if (cmp[p] != (pat[j] >= pat[i])) begin
              failures++;
              if (failures <= 10)
                $display("MISMATCH pair (%0d,%0d): %0d vs %0d gave %0b", i, j, pat[i], pat[j], cmp[p]);
            end
            p++;
          end
      end
      #1;
    end
    if (tie_bits == 0) failures++;
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
