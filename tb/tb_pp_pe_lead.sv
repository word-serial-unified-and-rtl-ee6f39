// tb_pp_pe_lead -- exhaustive check of the leftmost post-processing PE:
// the p/s column of an ordinary PE plus the buffers that drive d_top and
// r_top onto the broadcast line while u_n = 0 (and en = 1).
module tb_pp_pe_lead;
  logic u_n, en, h_j, c_j, d_top, d_jm1, q_j, r_top, r_jm1, d_km1, r_km1;
  logic bc_drive, bc_d, bc_r, p_j, s_j;
  int checks = 0, failures = 0;

  pp_pe_lead dut (.*);

  initial begin
    #10000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < (1 << 11); v++) begin
      logic [4:0] exp_o, got;
      {u_n, en, h_j, c_j, d_top, d_jm1, q_j, r_top, r_jm1, d_km1, r_km1} = 11'(v);
      #1;
      exp_o[4] = !u_n;
      exp_o[3] = !u_n && en && d_top;
      exp_o[2] = !u_n && en && r_top;
      exp_o[1] = ((en ? (c_j + d_jm1) : 0) + (d_km1 && h_j)) % 2 == 1;
      exp_o[0] = ((en ? (q_j + r_jm1) : 0) + (r_km1 && h_j)) % 2 == 1;
      got = {bc_drive, bc_d, bc_r, p_j, s_j};
      checks++;
      if (got !== exp_o) begin
        failures++;
        if (failures < 10) $display("mismatch in=%b got=%b exp=%b", 11'(v), got, exp_o);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
