// ss_array -- the 1 x l semi-systolic array of the multiplier-squarer.
//
// Each clock cycle the array takes one l-bit word of A, C, D, Q, R, H and H'
// (most significant word first) and returns the same word after one
// iteration of the loop. PE m (m = 0 leftmost) works on the column
// j = k-1 - t*l - m of word t. All PEs are combinational; the FIFOs outside
// hold the words between iterations.
//
// a_in is l+2 bits wide: the word of A itself in a_in[l+1:2] and, below it,
// the two most significant bits of the next lower word in a_in[1:0], which
// the two rightmost PEs need as a_{j-2}. Those two bits pass through AND
// gates with v (active low): in the last word of an iteration they lie below
// bit 0 of A and are forced to zero. The AND gates and their placement follow
// the published array.
//
// The leftmost PE drives a_{k-1} and a_{k-2} onto a horizontal line while
// u = 0 (first word of each iteration); a keeper register holds the line for
// the remaining words of that iteration. The keeper (standing in for the
// tri-state bus holding its value) is this design's choice; its reset value
// is zero. The four bits a_{2i-2}, a_{2i-1}, b_{2i-2}, b_{2i-1} arrive
// already registered and are broadcast to every PE.
//
// ad_ae are the new bits of the two leftmost PEs (a_d, a_e); they feed
// FIFO-a, which returns them as the low bits of a_in one word earlier in the
// next iteration.
module ss_array #(
  parameter int unsigned LW = 32   // word size l
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          u_n,
  input  logic          v_n,
  input  logic [LW+1:0] a_in,
  input  logic [LW-1:0] h_in,
  input  logic [LW-1:0] hp_in,
  input  logic [LW-1:0] c_in,
  input  logic [LW-1:0] d_in,
  input  logic [LW-1:0] q_in,
  input  logic [LW-1:0] r_in,
  input  logic          b_e,   // b_{2i-2}
  input  logic          b_o,   // b_{2i-1}
  input  logic          a_e,   // a_{2i-2}
  input  logic          a_o,   // a_{2i-1}
  output logic [LW-1:0] a_out,
  output logic [1:0]    ad_ae,
  output logic [LW-1:0] h_out,
  output logic [LW-1:0] hp_out,
  output logic [LW-1:0] c_out,
  output logic [LW-1:0] d_out,
  output logic [LW-1:0] q_out,
  output logic [LW-1:0] r_out
);
  logic [LW+1:0] a_g;          // a_in after the v gates
  logic          bc_drive, bc_km1, bc_km2;
  logic          km1_q, km2_q; // keeper of the broadcast line
  logic          a_km1, a_km2; // broadcast line

  always_comb begin
    a_g = {a_in[LW+1:2], a_in[1] & v_n, a_in[0] & v_n};
    a_km1 = bc_drive ? bc_km1 : km1_q;
    a_km2 = bc_drive ? bc_km2 : km2_q;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      km1_q <= 1'b0;
      km2_q <= 1'b0;
    end else if (bc_drive) begin
      km1_q <= bc_km1;
      km2_q <= bc_km2;
    end
  end

  // PE m sits at bit w = LW-1-m of the word; a_g[w+2] is its own A bit.
  ss_pe_lead u_lead (
    .u_n,
    .a_j   (a_g[LW+1]),
    .a_jm1 (a_g[LW]),
    .a_jm2 (a_g[LW-1]),
    .h_j   (h_in[LW-1]),
    .hp_j  (hp_in[LW-1]),
    .c_j   (c_in[LW-1]),
    .d_j   (d_in[LW-1]),
    .q_j   (q_in[LW-1]),
    .r_j   (r_in[LW-1]),
    .a_km1, .a_km2, .b_e, .b_o, .a_e, .a_o,
    .bc_drive, .bc_km1, .bc_km2,
    .a_new (a_out[LW-1]),
    .c_new (c_out[LW-1]),
    .d_new (d_out[LW-1]),
    .q_new (q_out[LW-1]),
    .r_new (r_out[LW-1]),
    .h_out (h_out[LW-1]),
    .hp_out(hp_out[LW-1])
  );

  for (genvar w = 0; w < LW - 1; w++) begin : g_pe
    ss_pe u_pe (
      .a_j   (a_g[w+2]),
      .a_jm2 (a_g[w]),
      .h_j   (h_in[w]),
      .hp_j  (hp_in[w]),
      .c_j   (c_in[w]),
      .d_j   (d_in[w]),
      .q_j   (q_in[w]),
      .r_j   (r_in[w]),
      .a_km1, .a_km2, .b_e, .b_o, .a_e, .a_o,
      .a_new (a_out[w]),
      .c_new (c_out[w]),
      .d_new (d_out[w]),
      .q_new (q_out[w]),
      .r_new (r_out[w]),
      .h_out (h_out[w]),
      .hp_out(hp_out[w])
    );
  end

  // the two-bit a_d/a_e path needs words of at least two bits
  if (LW < 2) begin : g_lw_check
    $error("ss_array: LW must be at least 2");
  end

  assign ad_ae = a_out[LW-1:LW-2];
endmodule
