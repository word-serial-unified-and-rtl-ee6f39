// pp_pe -- ordinary processing element of the post-processing array.
//
// After the last iteration, one PE turns column j of C, D, Q, R into bit j of
// the two results:
//   p_j = c_j ^ (d_{k-1} & h_j) ^ d_{j-1}
//   s_j = q_j ^ (r_{k-1} & h_j) ^ r_{j-1}
// which is (C + alpha*D) mod H and (Q + alpha*R) mod H. The c, d, q, r
// inputs enter through the pass gates T_c, T_d, T_q, T_r, open only while
// the array is in use (en = 1); the published PE uses tri-state buffers,
// modelled here in two-state logic as AND gates that give 0 when closed.
// One AND and two XORs per output, as in the published PE.
module pp_pe (
  input  logic en,      // T_c/T_d/T_q/T_r open
  input  logic h_j,
  input  logic c_j,     // c_j^g
  input  logic d_jm1,   // d_{j-1}^g
  input  logic q_j,     // q_j^g
  input  logic r_jm1,   // r_{j-1}^g
  input  logic d_km1,   // broadcast d_{k-1}^g
  input  logic r_km1,   // broadcast r_{k-1}^g
  output logic p_j,
  output logic s_j
);
  always_comb begin
    p_j = ((d_km1 & h_j) ^ (c_j & en)) ^ (d_jm1 & en);
    s_j = ((r_km1 & h_j) ^ (q_j & en)) ^ (r_jm1 & en);
  end
endmodule
