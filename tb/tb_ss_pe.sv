// tb_ss_pe -- exhaustive check of the ordinary semi-systolic PE.
// All 2^14 input combinations are applied; the expected outputs are worked
// out from the bit-level update rules of the loop (A shifted by two columns
// and reduced by h and h', C/D/Q/R accumulating A under the four broadcast
// bits), written here as parity sums.
module tb_ss_pe;
  logic a_j, a_jm2, h_j, hp_j, c_j, d_j, q_j, r_j, a_km1, a_km2, b_e, b_o, a_e, a_o;
  logic a_new, c_new, d_new, q_new, r_new, h_out, hp_out;
  int checks = 0, failures = 0;

  ss_pe dut (.*);

  initial begin
    #100000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < (1 << 14); v++) begin
      logic [13:0] x;
      logic [6:0]  exp_o, got;
      x = 14'(v);
      {a_j, a_jm2, h_j, hp_j, c_j, d_j, q_j, r_j, a_km1, a_km2, b_e, b_o, a_e, a_o} = x;
      #1;
      exp_o[6] = ^{a_jm2, a_km2 && h_j, a_km1 && hp_j};
      exp_o[5] = c_j != (b_e && a_j);
      exp_o[4] = d_j != (b_o && a_j);
      exp_o[3] = q_j != (a_e && a_j);
      exp_o[2] = r_j != (a_o && a_j);
      exp_o[1] = h_j;
      exp_o[0] = hp_j;
      got = {a_new, c_new, d_new, q_new, r_new, h_out, hp_out};
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
