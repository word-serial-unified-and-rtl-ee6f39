// tb_ss_pe_lead -- exhaustive check of the leftmost semi-systolic PE: the
// column update of an ordinary PE plus the broadcast buffers, which must
// drive a_j and a_{j-1} while u_n = 0 and nothing (enable low) otherwise.
module tb_ss_pe_lead;
  logic u_n, a_j, a_jm1, a_jm2, h_j, hp_j, c_j, d_j, q_j, r_j;
  logic a_km1, a_km2, b_e, b_o, a_e, a_o;
  logic bc_drive, bc_km1, bc_km2, a_new, c_new, d_new, q_new, r_new, h_out, hp_out;
  int checks = 0, failures = 0;

  ss_pe_lead dut (.*);

  initial begin
    #100000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < (1 << 16); v++) begin
      logic [15:0] x;
      logic [9:0]  exp_o, got;
      x = 16'(v);
      {u_n, a_j, a_jm1, a_jm2, h_j, hp_j, c_j, d_j, q_j, r_j,
       a_km1, a_km2, b_e, b_o, a_e, a_o} = x;
      #1;
      exp_o[9] = !u_n;
      exp_o[8] = !u_n && a_j;
      exp_o[7] = !u_n && a_jm1;
      exp_o[6] = ^{a_jm2, a_km2 && h_j, a_km1 && hp_j};
      exp_o[5] = c_j != (b_e && a_j);
      exp_o[4] = d_j != (b_o && a_j);
      exp_o[3] = q_j != (a_e && a_j);
      exp_o[2] = r_j != (a_o && a_j);
      exp_o[1] = h_j;
      exp_o[0] = hp_j;
      got = {bc_drive, bc_km1, bc_km2, a_new, c_new, d_new, q_new, r_new, h_out, hp_out};
      checks++;
      if (got !== exp_o) begin
        failures++;
        if (failures < 10) $display("mismatch in=%b got=%b exp=%b", x, got, exp_o);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
