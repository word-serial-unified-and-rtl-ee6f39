// gf2k_msq_core -- word-serial unified multiplier-squarer over GF(2^k).
//
// From one pair of operands A, B it computes both P = A*B mod H and
// S = A*A mod H in one pass, with a datapath of only l bit-columns that is
// reused over L = ceil(k/l) words. The loop of the bipartite algorithm runs
// g = ceil(k/2) times; iteration i consumes two bits of B and two bits of A:
//   A <- A*alpha^2 mod H,  C += b_{2i-2}A,  D += b_{2i-1}A,
//                          Q += a_{2i-2}A,  R += a_{2i-1}A
// and a final pass forms P = (C + alpha*D) mod H, S = (Q + alpha*R) mod H.
//
// Structure (as in the published core): input registers A, H, H' with the
// 2-to-1 multiplexers M_a, M_h, M_h'; the 1 x l semi-systolic array
// (ss_array); FIFO-C/D/Q/R/H/H'/A (l bits x L) that recirculate the words
// between iterations; FIFO-a (2 bits x L-1) carrying the top two new A bits
// of each word one cycle less, because they are used by the neighbouring,
// more significant word; FIFO-dd and FIFO-rd (1 bit x L-1), the same for
// D and R in the final pass; the 1 x l post-processing array (pp_array);
// output registers P and S; four broadcast-bit flip-flops (bit_sched); and
// the controller (msq_ctrl).
//
// Interface: h holds h_0 .. h_{k-1}, the coefficients of alpha^k mod H (the
// field polynomial without its x^k term); hp holds alpha^(k+1) mod H, which
// the user supplies precomputed. A one-cycle start while idle captures a, b,
// h, hp. busy is then high for exactly (g+1)*L cycles; done pulses in the
// next cycle and p, s hold the results until the next operation finishes.
// For k = 409, l = 32: L = 13, g = 205, 2678 cycles.
// The handshake and the parallel-load operand interface are this design's
// choices; the dataflow and its timing follow the published core.
module gf2k_msq_core
  import msq_pkg::*;
#(
  parameter int unsigned K  = 409,  // field size k
  parameter int unsigned LW = 32    // word size l
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         start,
  input  logic [K-1:0] a,
  input  logic [K-1:0] b,
  input  logic [K-1:0] h,
  input  logic [K-1:0] hp,
  output logic         busy,
  output logic         done,
  output logic [K-1:0] p,
  output logic [K-1:0] s
);
  localparam int unsigned NW = num_words(K, LW);
  localparam int unsigned G  = num_iters(K);

  if (NW < 2) begin : g_size_check
    $error("gf2k_msq_core: need at least two words (K > LW)");
  end

  msq_ctrl_t ctl;

  // input registers and multiplexers
  logic [LW+1:0] a_word, a_fifo, a_in;
  logic [LW-1:0] h_word, hp_word, h_in, hp_in;
  // FIFO outputs
  logic [LW-1:0] c_f, d_f, q_f, r_f, h_f, hp_f, aw_f;
  logic [1:0]    ad_f;
  logic          dd_f, rd_f;
  // semi-systolic array outputs
  logic [LW-1:0] a_o, c_o, d_o, q_o, r_o, h_o, hp_o;
  logic [1:0]    ad_o;
  // broadcast bits
  logic          b_e, b_o, a_e, a_o_bit;
  // post-processing array outputs
  logic [LW-1:0] p_w, s_w;

  msq_ctrl #(.NW(NW), .G(G)) u_ctrl (
    .clk, .rst_n, .start, .ctl, .busy, .done
  );

  word_in_reg #(.K(K), .LW(LW), .EXTRA(2)) u_reg_a (
    .clk, .rst_n, .load(ctl.load), .shift(ctl.in_sel), .d(a), .word(a_word)
  );
  word_in_reg #(.K(K), .LW(LW), .EXTRA(0)) u_reg_h (
    .clk, .rst_n, .load(ctl.load), .shift(ctl.in_sel), .d(h), .word(h_word)
  );
  word_in_reg #(.K(K), .LW(LW), .EXTRA(0)) u_reg_hp (
    .clk, .rst_n, .load(ctl.load), .shift(ctl.in_sel), .d(hp), .word(hp_word)
  );

  bit_sched #(.K(K)) u_bits (
    .clk, .rst_n, .load(ctl.load), .adv(ctl.bits_adv), .a, .b,
    .b_e, .b_o, .a_e, .a_o(a_o_bit)
  );

  // M_a, M_h, M_h'
  always_comb begin
    a_fifo = {aw_f, ad_f};
    a_in   = ctl.in_sel ? a_word  : a_fifo;
    h_in   = ctl.in_sel ? h_word  : h_f;
    hp_in  = ctl.in_sel ? hp_word : hp_f;
  end

  ss_array #(.LW(LW)) u_ss (
    .clk, .rst_n, .u_n(ctl.ss_u_n), .v_n(ctl.ss_v_n),
    .a_in, .h_in, .hp_in, .c_in(c_f), .d_in(d_f), .q_in(q_f), .r_in(r_f),
    .b_e, .b_o, .a_e, .a_o(a_o_bit),
    .a_out(a_o), .ad_ae(ad_o), .h_out(h_o), .hp_out(hp_o),
    .c_out(c_o), .d_out(d_o), .q_out(q_o), .r_out(r_o)
  );

  // FIFO-C/D/Q/R start an operation cleared: the initial zero words
  msq_fifo #(.W(LW), .DEPTH(NW)) u_fifo_c (
    .clk, .rst_n, .en(ctl.fifo_en), .clr(ctl.fifo_clr), .din(c_o), .dout(c_f));
  msq_fifo #(.W(LW), .DEPTH(NW)) u_fifo_d (
    .clk, .rst_n, .en(ctl.fifo_en), .clr(ctl.fifo_clr), .din(d_o), .dout(d_f));
  msq_fifo #(.W(LW), .DEPTH(NW)) u_fifo_q (
    .clk, .rst_n, .en(ctl.fifo_en), .clr(ctl.fifo_clr), .din(q_o), .dout(q_f));
  msq_fifo #(.W(LW), .DEPTH(NW)) u_fifo_r (
    .clk, .rst_n, .en(ctl.fifo_en), .clr(ctl.fifo_clr), .din(r_o), .dout(r_f));
  msq_fifo #(.W(LW), .DEPTH(NW)) u_fifo_h (
    .clk, .rst_n, .en(ctl.fifo_en), .clr(1'b0), .din(h_o), .dout(h_f));
  msq_fifo #(.W(LW), .DEPTH(NW)) u_fifo_hp (
    .clk, .rst_n, .en(ctl.fifo_en), .clr(1'b0), .din(hp_o), .dout(hp_f));
  msq_fifo #(.W(LW), .DEPTH(NW)) u_fifo_aw (
    .clk, .rst_n, .en(ctl.fifo_en), .clr(1'b0), .din(a_o), .dout(aw_f));
  msq_fifo #(.W(2), .DEPTH(NW - 1)) u_fifo_ad (
    .clk, .rst_n, .en(ctl.fifo_en), .clr(1'b0), .din(ad_o), .dout(ad_f));
  msq_fifo #(.W(1), .DEPTH(NW - 1)) u_fifo_dd (
    .clk, .rst_n, .en(ctl.fifo_en), .clr(1'b0), .din(d_o[LW-1]), .dout(dd_f));
  msq_fifo #(.W(1), .DEPTH(NW - 1)) u_fifo_rd (
    .clk, .rst_n, .en(ctl.fifo_en), .clr(1'b0), .din(r_o[LW-1]), .dout(rd_f));

  pp_array #(.LW(LW)) u_pp (
    .clk, .rst_n, .en(ctl.pp_en), .u_n(ctl.pp_u_n), .v_n(ctl.pp_v_n),
    .h_in(h_f), .c_in(c_f), .q_in(q_f),
    .d_in({d_f, dd_f}), .r_in({r_f, rd_f}),
    .p_out(p_w), .s_out(s_w)
  );

  word_out_reg #(.K(K), .LW(LW)) u_reg_p (
    .clk, .rst_n, .load(ctl.out_load), .word(p_w), .q(p));
  word_out_reg #(.K(K), .LW(LW)) u_reg_s (
    .clk, .rst_n, .load(ctl.out_load), .word(s_w), .q(s));
endmodule
