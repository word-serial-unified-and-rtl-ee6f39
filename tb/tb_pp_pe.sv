// tb_pp_pe -- exhaustive check of the ordinary post-processing PE:
// p = c + d_{k-1}h + d_{j-1}, s = q + r_{k-1}h + r_{j-1}, with the c/d/q/r
// inputs counted only while the pass gates are open (en = 1).
module tb_pp_pe;
  logic en, h_j, c_j, d_jm1, q_j, r_jm1, d_km1, r_km1, p_j, s_j;
  int checks = 0, failures = 0;

  pp_pe dut (.*);

  initial begin
    #10000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < (1 << 8); v++) begin
      logic [1:0] exp_o;
      {en, h_j, c_j, d_jm1, q_j, r_jm1, d_km1, r_km1} = 8'(v);
      #1;
      exp_o[1] = ((en ? (c_j + d_jm1) : 0) + (d_km1 && h_j)) % 2 == 1;
      exp_o[0] = ((en ? (q_j + r_jm1) : 0) + (r_km1 && h_j)) % 2 == 1;
      checks++;
      if ({p_j, s_j} !== exp_o) begin
        failures++;
        $display("mismatch in=%b got=%b exp=%b", 8'(v), {p_j, s_j}, exp_o);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
