// ss_pe -- ordinary processing element of the semi-systolic array.
//
// One PE handles one bit column j of the current word during one iteration i
// of the bipartite multiply-square loop. It is purely combinational; the
// words it produces are stored by the FIFOs around the array.
//   a_j^i = a_{j-2}^{i-1} ^ (a_{k-2}^{i-1} & h_j) ^ (a_{k-1}^{i-1} & h'_j)
//   c_j^i = c_j^{i-1} ^ (b_{2i-2} & a_j^{i-1})
//   d_j^i = d_j^{i-1} ^ (b_{2i-1} & a_j^{i-1})
//   q_j^i = q_j^{i-1} ^ (a_{2i-2} & a_j^{i-1})
//   r_j^i = r_j^{i-1} ^ (a_{2i-1} & a_j^{i-1})
// h_j and h'_j pass straight down so that the FIFOs can recirculate them.
// The gate network (four AND-XOR cells for C/D/Q/R, two ANDs and two XORs
// for A) follows the published PE; port names are this design's own.
module ss_pe (
  input  logic a_j,     // a_j^{i-1}, this column of A
  input  logic a_jm2,   // a_{j-2}^{i-1}, two columns to the right
  input  logic h_j,     // coefficient j of alpha^k mod H
  input  logic hp_j,    // coefficient j of alpha^(k+1) mod H (H')
  input  logic c_j,
  input  logic d_j,
  input  logic q_j,
  input  logic r_j,
  input  logic a_km1,   // broadcast a_{k-1}^{i-1}
  input  logic a_km2,   // broadcast a_{k-2}^{i-1}
  input  logic b_e,     // broadcast b_{2i-2}
  input  logic b_o,     // broadcast b_{2i-1}
  input  logic a_e,     // broadcast a_{2i-2}
  input  logic a_o,     // broadcast a_{2i-1}
  output logic a_new,   // a_j^i
  output logic c_new,
  output logic d_new,
  output logic q_new,
  output logic r_new,
  output logic h_out,
  output logic hp_out
);
  always_comb begin
    a_new  = a_jm2 ^ ((a_km2 & h_j) ^ (a_km1 & hp_j));
    c_new  = c_j ^ (b_e & a_j);
    d_new  = d_j ^ (b_o & a_j);
    q_new  = q_j ^ (a_e & a_j);
    r_new  = r_j ^ (a_o & a_j);
    h_out  = h_j;
    hp_out = hp_j;
  end
endmodule
