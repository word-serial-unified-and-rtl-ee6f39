// tb_word_in_reg -- checks the operand input registers at k = 409, l = 32
// (13 words, 7 padding zeros): after a load, successive shifts must present
// the words most significant first; with EXTRA = 2 each word also carries the
// two top bits of the next lower word (zeros below the last word).
module tb_word_in_reg;
  localparam int K = 409, LW = 32, NW = (K + LW - 1) / LW;
  logic clk = 1'b0, rst_n = 1'b0, load, shift;
  logic [K-1:0]    d;
  logic [LW+1:0]   word_a;
  logic [LW-1:0]   word_h;
  int checks = 0, failures = 0;

  word_in_reg #(.K(K), .LW(LW), .EXTRA(2)) dut_a (.clk, .rst_n, .load, .shift, .d, .word(word_a));
  word_in_reg #(.K(K), .LW(LW), .EXTRA(0)) dut_h (.clk, .rst_n, .load, .shift, .d, .word(word_h));

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // bit j of the operand; columns below bit 0 (padding, look-ahead) are zero
  function automatic logic bit_at(input logic [K-1:0] x, input int j);
    return (j >= 0 && j < K) ? x[j] : 1'b0;
  endfunction

  logic [K-1:0] op_d;   // operand of the last load

  initial begin
    load = 1'b0; shift = 1'b0; d = '0;
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    for (int op = 0; op < 50; op++) begin
      @(negedge clk);
      for (int i = 0; i < K; i++) d[i] = 1'($urandom);
      op_d = d;
      load = 1'b1;
      @(negedge clk);
      load = 1'b0;
      d = '0;   // the register must not follow the input after the load
      for (int t = 0; t < NW; t++) begin
        logic [LW+1:0] ea;
        logic [LW-1:0] eh;
        // word t covers columns j = K-1 - t*LW down to K - (t+1)*LW
        for (int m = 0; m < LW + 2; m++) ea[LW+1-m] = bit_at(op_d, K - 1 - t * LW - m);
        for (int m = 0; m < LW; m++)     eh[LW-1-m] = bit_at(op_d, K - 1 - t * LW - m);
        checks += 2;
        if (word_a !== ea) begin
          failures++;
          if (failures < 10) $display("A word %0d got %h exp %h", t, word_a, ea);
        end
        if (word_h !== eh) begin
          failures++;
          if (failures < 10) $display("H word %0d got %h exp %h", t, word_h, eh);
        end
        shift = 1'b1;
        @(negedge clk);
        shift = 1'b0;
        // a cycle without shift must hold the word
        if (t == 3) begin
          @(negedge clk);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
