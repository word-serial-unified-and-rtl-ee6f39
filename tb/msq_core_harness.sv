// msq_core_harness -- drives one gf2k_msq_core of size K, LW through NOPS
// operations and checks P = A*B mod H, S = A*A mod H against a bit-serial
// reference and the latency against (g+1)*L. With EXHAUSTIVE = 1 it instead
// walks all 2^K x 2^K operand pairs (small K only). H is random for each
// operation, except in exhaustive mode, where it is x^K + H_FIXED. Results
// are reported on the ports when fin rises.
module msq_core_harness #(
  parameter int unsigned K          = 5,
  parameter int unsigned LW         = 3,
  parameter int unsigned NOPS       = 10,
  parameter bit          EXHAUSTIVE = 1'b0,
  parameter logic [K-1:0] H_FIXED   = '0
) (
  input  logic clk,
  input  logic rst_n,
  output logic fin,
  output int   checks,
  output int   failures
);
  localparam int NW = (K + LW - 1) / LW;
  localparam int G  = (K + 1) / 2;

  logic         start = 1'b0;
  logic [K-1:0] a = '0, b = '0, h = '0, hp = '0, p, s;
  logic         busy, done;

  gf2k_msq_core #(.K(K), .LW(LW)) dut (.*);

  function automatic logic [K-1:0] gf_mul(input logic [K-1:0] x, input logic [K-1:0] y,
                                          input logic [K-1:0] hh);
    logic [K-1:0] acc;
    acc = '0;
    for (int i = K - 1; i >= 0; i--) begin
      acc = (acc << 1) ^ (acc[K-1] ? hh : '0);
      if (y[i]) acc ^= x;
    end
    return acc;
  endfunction

  function automatic logic [K-1:0] rnd_vec();
    logic [K-1:0] v;
    for (int i = 0; i < K; i++) v[i] = 1'($urandom);
    return v;
  endfunction

  task automatic run_op(input logic [K-1:0] ta, input logic [K-1:0] tb, input logic [K-1:0] th);
    logic [K-1:0] ep, es;
    int cyc;
    a = ta; b = tb; h = th; hp = (th << 1) ^ (th[K-1] ? th : '0);
    ep = gf_mul(ta, tb, th);
    es = gf_mul(ta, ta, th);
    @(negedge clk);
    start = 1'b1;
    @(negedge clk);
    start = 1'b0;
    cyc = 0;
    while (busy) begin
      cyc++;
      @(negedge clk);
    end
    checks += 3;
    if (cyc != (G + 1) * NW) begin
      failures++;
      $display("K=%0d LW=%0d: latency %0d, expected %0d", K, LW, cyc, (G + 1) * NW);
    end
    if (p !== ep) begin
      failures++;
      if (failures < 10) $display("K=%0d LW=%0d: P a=%h b=%h h=%h got %h exp %h", K, LW, ta, tb, th, p, ep);
    end
    if (s !== es) begin
      failures++;
      if (failures < 10) $display("K=%0d LW=%0d: S a=%h h=%h got %h exp %h", K, LW, ta, th, s, es);
    end
  endtask

  initial begin
    fin = 1'b0; checks = 0; failures = 0;
    @(posedge rst_n);
    if (EXHAUSTIVE) begin
      for (int x = 0; x < (1 << K); x++)
        for (int y = 0; y < (1 << K); y++)
          run_op(K'(x), K'(y), H_FIXED);
    end else begin
      run_op('1, '1, '1);
      for (int op = 1; op < NOPS; op++) run_op(rnd_vec(), rnd_vec(), rnd_vec());
    end
    fin = 1'b1;
  end
endmodule
