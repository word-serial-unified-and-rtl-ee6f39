// tb_bit_sched -- checks the broadcast-bit source at k = 409: after a load,
// iteration i (advanced by adv) presents b_{2i-2}, b_{2i-1}, a_{2i-2},
// a_{2i-1}, and b_409 = a_409 = 0 in the last iteration (k odd).
module tb_bit_sched;
  localparam int K = 409, G = (K + 1) / 2;
  logic clk = 1'b0, rst_n = 1'b0, load, adv;
  logic [K-1:0] a, b;
  logic b_e, b_o, a_e, a_o;
  int checks = 0, failures = 0;

  bit_sched #(.K(K)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic bit_of(input logic [K-1:0] x, input int j);
    return (j < K) ? x[j] : 1'b0;
  endfunction

  initial begin
    logic [K-1:0] ra, rb;
    load = 1'b0; adv = 1'b0; a = '0; b = '0;
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    for (int op = 0; op < 20; op++) begin
      @(negedge clk);
      for (int i = 0; i < K; i++) begin a[i] = 1'($urandom); b[i] = 1'($urandom); end
      ra = a; rb = b;
      if (op == 0) begin a = '1; b = '1; ra = a; rb = b; end
      load = 1'b1;
      @(negedge clk);
      load = 1'b0; a = '0; b = '0;
      for (int i = 1; i <= G; i++) begin
        logic [3:0] exp_b;
        exp_b = {bit_of(rb, 2*i-2), bit_of(rb, 2*i-1), bit_of(ra, 2*i-2), bit_of(ra, 2*i-1)};
        checks++;
        if ({b_e, b_o, a_e, a_o} !== exp_b) begin
          failures++;
          if (failures < 10) $display("iteration %0d got %b exp %b", i, {b_e, b_o, a_e, a_o}, exp_b);
        end
        // bits must hold for a few cycles without adv
        repeat ($urandom % 3) @(negedge clk);
        adv = 1'b1;
        @(negedge clk);
        adv = 1'b0;
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
