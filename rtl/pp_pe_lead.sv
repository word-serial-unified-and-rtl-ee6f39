// pp_pe_lead -- leftmost processing element of the post-processing array.
//
// It computes p_j and s_j like pp_pe, and owns the two buffers that put
// d_{k-1} and r_{k-1} on the horizontal broadcast line while u = 0 (active
// low), which is the first post-processing cycle, when the most significant
// word of D and R is present. The buffers take the most significant bit of
// the incoming D and R words (d_top, r_top); in the published PE they are
// drawn on the d_{j-1}, r_{j-1} lines, which at this column would be
// d_{k-2}, r_{k-2}, so the separate d_top/r_top taps are this design's
// reading. Tri-state buffers are modelled as a drive-enable plus a value; the
// keeper of the line sits in pp_array.
module pp_pe_lead (
  input  logic u_n,
  input  logic en,
  input  logic h_j,
  input  logic c_j,
  input  logic d_top,    // d_{k-1}^g while u_n = 0
  input  logic d_jm1,
  input  logic q_j,
  input  logic r_top,    // r_{k-1}^g while u_n = 0
  input  logic r_jm1,
  input  logic d_km1,    // broadcast line
  input  logic r_km1,
  output logic bc_drive,
  output logic bc_d,
  output logic bc_r,
  output logic p_j,
  output logic s_j
);
  always_comb begin
    bc_drive = ~u_n;
    bc_d     = ~u_n & d_top & en;
    bc_r     = ~u_n & r_top & en;
  end

  pp_pe u_pe (.en, .h_j, .c_j, .d_jm1, .q_j, .r_jm1, .d_km1, .r_km1, .p_j, .s_j);
endmodule
