// pp_array -- the 1 x l post-processing array.
//
// In each of the last L cycles of an operation it receives one word (most
// significant first) of C^g, Q^g and H, and of D^g and R^g, and produces the
// matching word of P = (C + alpha*D) mod H and S = (Q + alpha*R) mod H.
//
// d_in and r_in are l+1 bits: the word itself in [l:1] and, in bit 0, the
// most significant bit of the next lower word (from FIFO-dd / FIFO-rd),
// because the rightmost PE needs d_{j-1} from there. That bit passes through
// an AND gate with v (active low); v = 0 in the last word, where it lies
// below bit 0 and must be zero. In the first word (u = 0) the leftmost PE
// drives d_{k-1}, r_{k-1} onto a broadcast line, and a keeper register holds
// them for the remaining words (the keeper stands in for the tri-state line
// and resets to zero). en opens the T gates of every PE.
module pp_array #(
  parameter int unsigned LW = 32
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          en,
  input  logic          u_n,
  input  logic          v_n,
  input  logic [LW-1:0] h_in,
  input  logic [LW-1:0] c_in,
  input  logic [LW-1:0] q_in,
  input  logic [LW:0]   d_in,
  input  logic [LW:0]   r_in,
  output logic [LW-1:0] p_out,
  output logic [LW-1:0] s_out
);
  logic [LW:0] d_g, r_g;
  logic        bc_drive, bc_d, bc_r;
  logic        d_q, r_q;      // keeper
  logic        d_km1, r_km1;  // broadcast line

  always_comb begin
    d_g   = {d_in[LW:1], d_in[0] & v_n};
    r_g   = {r_in[LW:1], r_in[0] & v_n};
    d_km1 = bc_drive ? bc_d : d_q;
    r_km1 = bc_drive ? bc_r : r_q;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      d_q <= 1'b0;
      r_q <= 1'b0;
    end else if (bc_drive) begin
      d_q <= bc_d;
      r_q <= bc_r;
    end
  end

  // PE m sits at word bit w = LW-1-m; d_g[w+1] is its own D bit.
  pp_pe_lead u_lead (
    .u_n, .en,
    .h_j   (h_in[LW-1]),
    .c_j   (c_in[LW-1]),
    .d_top (d_g[LW]),
    .d_jm1 (d_g[LW-1]),
    .q_j   (q_in[LW-1]),
    .r_top (r_g[LW]),
    .r_jm1 (r_g[LW-1]),
    .d_km1, .r_km1,
    .bc_drive, .bc_d, .bc_r,
    .p_j   (p_out[LW-1]),
    .s_j   (s_out[LW-1])
  );

  for (genvar w = 0; w < LW - 1; w++) begin : g_pe
    pp_pe u_pe (
      .en,
      .h_j   (h_in[w]),
      .c_j   (c_in[w]),
      .d_jm1 (d_g[w]),
      .q_j   (q_in[w]),
      .r_jm1 (r_g[w]),
      .d_km1, .r_km1,
      .p_j   (p_out[w]),
      .s_j   (s_out[w])
    );
  end
endmodule
