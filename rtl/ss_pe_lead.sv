// ss_pe_lead -- leftmost processing element of the semi-systolic array.
//
// It does everything an ss_pe does, and in addition owns the two buffers
// that put a_{k-1}^{i-1} and a_{k-2}^{i-1} on the horizontal broadcast line.
// In the first cycle of each iteration (u = 0, active low) the word entering
// the array is the most significant one, so this PE's own A bit is a_{k-1}
// and the bit to its right is a_{k-2}; the buffers then drive those two bits.
// The published PE uses tri-state buffers; here a buffer is modelled as a
// drive-enable plus a value (two-state logic), and the line's keeper that
// holds the value for the rest of the iteration sits in ss_array.
module ss_pe_lead (
  input  logic u_n,      // 0: drive the broadcast line
  input  logic a_j,      // a_j^{i-1} (a_{k-1}^{i-1} when u_n = 0)
  input  logic a_jm1,    // a_{j-1}^{i-1} (a_{k-2}^{i-1} when u_n = 0)
  input  logic a_jm2,
  input  logic h_j,
  input  logic hp_j,
  input  logic c_j,
  input  logic d_j,
  input  logic q_j,
  input  logic r_j,
  input  logic a_km1,    // broadcast line as seen by all PEs
  input  logic a_km2,
  input  logic b_e,
  input  logic b_o,
  input  logic a_e,
  input  logic a_o,
  output logic bc_drive, // buffers enabled
  output logic bc_km1,   // value driven onto the a_{k-1} line
  output logic bc_km2,   // value driven onto the a_{k-2} line
  output logic a_new,
  output logic c_new,
  output logic d_new,
  output logic q_new,
  output logic r_new,
  output logic h_out,
  output logic hp_out
);
  always_comb begin
    bc_drive = ~u_n;
    bc_km1   = ~u_n & a_j;
    bc_km2   = ~u_n & a_jm1;
  end

  ss_pe u_pe (
    .a_j, .a_jm2, .h_j, .hp_j, .c_j, .d_j, .q_j, .r_j,
    .a_km1, .a_km2, .b_e, .b_o, .a_e, .a_o,
    .a_new, .c_new, .d_new, .q_new, .r_new, .h_out, .hp_out
  );
endmodule
