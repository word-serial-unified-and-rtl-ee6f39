// tb_gf2k_msq_core -- end-to-end test of the multiplier-squarer at its
// default size, k = 409 and l = 32 (13 words, 205 iterations).
//
// Each operation loads A, B, H and H', pulses start and waits for done. The
// results are compared with P = A*B mod H and S = A*A mod H from a bit-serial
// shift-and-add reference (most significant bit of B first, reducing by the
// full polynomial x^k + h), which shares nothing with the bipartite
// word-serial schedule; H' = x^(k+1) mod H is computed the same way. The
// field polynomials are the NIST trinomial x^409 + x^87 + 1
// and random ones (the algorithm needs no irreducibility). Operands include
// 0, 1, all ones and random values. Each operation must keep busy for exactly
// (g+1)*L = 2678 cycles. The test counts how often each mechanism of the core
// is exercised and fails if one never is: loading through the input
// multiplexers, the u broadcasts and v gates of both arrays, the keepers
// holding a broadcast bit, FIFO-a feeding non-zero a_d/a_e bits, the FIFO
// clear, and a start request ignored while busy.
module tb_gf2k_msq_core;
  localparam int K  = 409;
  localparam int LW = 32;
  localparam int NW = (K + LW - 1) / LW;
  localparam int G  = (K + 1) / 2;
  localparam int NOPS = 24;

  logic clk = 1'b0, rst_n = 1'b0, start = 1'b0;
  logic [K-1:0] a, b, h, hp, p, s;
  logic busy, done;
  int checks = 0, failures = 0;

  gf2k_msq_core dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (NOPS * ((G + 1) * NW + 20) + 1000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // x*y mod (x^K + hh), bit-serial
  function automatic logic [K-1:0] gf_mul(input logic [K-1:0] x, input logic [K-1:0] y,
                                          input logic [K-1:0] hh);
    logic [K-1:0] acc;
    acc = '0;
    for (int i = K - 1; i >= 0; i--) begin
      acc = {acc[K-2:0], 1'b0} ^ (acc[K-1] ? hh : '0);
      if (y[i]) acc ^= x;
    end
    return acc;
  endfunction

  function automatic logic [K-1:0] times_x(input logic [K-1:0] x, input logic [K-1:0] hh);
    return {x[K-2:0], 1'b0} ^ (x[K-1] ? hh : '0);
  endfunction

  function automatic logic [K-1:0] rnd_vec();
    logic [K-1:0] v;
    for (int i = 0; i < K; i += 32) v = {v[K-1:0] << 32} | K'($urandom);
    return v;
  endfunction

  // mechanism counters
  int n_insel = 0, n_ssu = 0, n_ssv = 0, n_ppu = 0, n_ppv = 0;
  int n_keep_ss = 0, n_keep_pp = 0, n_fifo_a = 0, n_clr = 0, n_ignored = 0;

  always @(posedge clk) if (rst_n) begin
    if (dut.ctl.in_sel) n_insel++;
    if (!dut.ctl.ss_u_n) n_ssu++;
    if (!dut.ctl.ss_v_n) n_ssv++;
    if (!dut.ctl.pp_u_n) n_ppu++;
    if (!dut.ctl.pp_v_n) n_ppv++;
    if (dut.ctl.ss_u_n && dut.ctl.ss_v_n && busy && !dut.ctl.pp_en && dut.u_ss.a_km1) n_keep_ss++;
    if (dut.ctl.pp_en && dut.ctl.pp_u_n && dut.u_pp.d_km1) n_keep_pp++;
    if (busy && !dut.ctl.in_sel && !dut.ctl.pp_en && dut.ad_f != 2'b00) n_fifo_a++;
    if (dut.ctl.fifo_clr) n_clr++;
    if (busy && start) n_ignored++;
  end

  task automatic run_op(input logic [K-1:0] ta, input logic [K-1:0] tb, input logic [K-1:0] th,
                        input bit poke_start);
    logic [K-1:0] ep, es;
    int cyc;
    a = ta; b = tb; h = th; hp = times_x(th, th);
    ep = gf_mul(ta, tb, th);
    es = gf_mul(ta, ta, th);
    @(negedge clk);
    start = 1'b1;
    @(negedge clk);
    start = 1'b0;
    // the operands may change once captured
    a = rnd_vec(); b = rnd_vec(); h = rnd_vec(); hp = rnd_vec();
    cyc = 0;
    while (busy) begin
      cyc++;
      start = poke_start && (cyc == 100);
      @(negedge clk);
    end
    start = 1'b0;
    checks++;
    if (cyc != (G + 1) * NW) begin
      failures++;
      $display("latency %0d cycles, expected %0d", cyc, (G + 1) * NW);
    end
    checks++;
    if (!done) begin
      failures++;
      $display("done missing");
    end
    checks += 2;
    if (p !== ep) begin
      failures++;
      $display("P mismatch\n a=%h\n b=%h\n h=%h\n got %h\n exp %h", ta, tb, th, p, ep);
    end
    if (s !== es) begin
      failures++;
      $display("S mismatch\n a=%h\n h=%h\n got %h\n exp %h", ta, th, s, es);
    end
  endtask

  initial begin
    logic [K-1:0] nist, one, ones;
    nist = '0; nist[87] = 1'b1; nist[0] = 1'b1;
    one = K'(1);
    ones = '1;
    a = '0; b = '0; h = '0; hp = '0;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    run_op(rnd_vec(), rnd_vec(), nist, 1'b1);
    run_op('0, rnd_vec(), nist, 1'b0);
    run_op(one, rnd_vec(), nist, 1'b0);
    run_op(rnd_vec(), one, nist, 1'b0);
    run_op(ones, ones, nist, 1'b0);
    for (int op = 5; op < NOPS; op++)
      run_op(rnd_vec(), rnd_vec(), (op % 2 == 1) ? nist : rnd_vec(), 1'b0);
    $display("mechanisms: in_sel=%0d ss_u=%0d ss_v=%0d pp_u=%0d pp_v=%0d keep_ss=%0d keep_pp=%0d fifo_a=%0d clear=%0d ignored_start=%0d",
             n_insel, n_ssu, n_ssv, n_ppu, n_ppv, n_keep_ss, n_keep_pp, n_fifo_a, n_clr, n_ignored);
    checks += 10;
    if (n_insel == 0)   failures++;
    if (n_ssu == 0)     failures++;
    if (n_ssv == 0)     failures++;
    if (n_ppu == 0)     failures++;
    if (n_ppv == 0)     failures++;
    if (n_keep_ss == 0) failures++;
    if (n_keep_pp == 0) failures++;
    if (n_fifo_a == 0)  failures++;
    if (n_clr == 0)     failures++;
    if (n_ignored == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
