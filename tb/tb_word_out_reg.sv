// tb_word_out_reg -- checks the result registers at k = 409, l = 32: after
// 13 word loads (most significant first) the k-bit output equals the words
// joined with the 7 padding bits of the last word dropped, and it holds while
// load is low.
module tb_word_out_reg;
  localparam int K = 409, LW = 32, NW = (K + LW - 1) / LW;
  logic clk = 1'b0, rst_n = 1'b0, load;
  logic [LW-1:0] word;
  logic [K-1:0]  q;
  int checks = 0, failures = 0;

  word_out_reg #(.K(K), .LW(LW)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    load = 1'b0; word = '0;
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    for (int op = 0; op < 50; op++) begin
      logic [K-1:0] exp_q;
      for (int t = 0; t < NW; t++) begin
        @(negedge clk);
        word = $urandom;
        load = 1'b1;
        // column j of the result is bit m of word t with j = K-1 - t*LW - m
        for (int m = 0; m < LW; m++)
          if (K - 1 - t * LW - m >= 0) exp_q[K-1-t*LW-m] = word[LW-1-m];
      end
      @(negedge clk);
      load = 1'b0;
      word = $urandom;
      for (int w = 0; w < 3; w++) begin
        checks++;
        if (q !== exp_q) begin
          failures++;
          if (failures < 10) $display("op %0d got %h exp %h", op, q, exp_q);
        end
        @(negedge clk);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
