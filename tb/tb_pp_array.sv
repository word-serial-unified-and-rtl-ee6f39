// tb_pp_array -- random-word check of the post-processing array at l = 32.
// As in the core, the first word of a group has u_n = 0 (d_{k-1}, r_{k-1}
// taken from the top bit of the D and R words) and the rest u_n = 1 (the
// keeper holds them). Expected words: P = C ^ d_{k-1}*H ^ (D >> 1 with the
// next word's top bit gated by v), and likewise S from Q and R. A last phase
// checks that closed pass gates (en = 0) leave only the h terms.
module tb_pp_array;
  localparam int LW = 32;
  logic          clk = 1'b0, rst_n = 1'b0, en, u_n, v_n;
  logic [LW-1:0] h_in, c_in, q_in, p_out, s_out;
  logic [LW:0]   d_in, r_in;
  int checks = 0, failures = 0;
  logic m_d = 1'b0, m_r = 1'b0;

  pp_array #(.LW(LW)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [LW-1:0] rnd();
    return LW'({$urandom, $urandom});
  endfunction

  task automatic check(input string what, input logic [LW-1:0] got, input logic [LW-1:0] exp_w);
    checks++;
    if (got !== exp_w) begin
      failures++;
      if (failures < 10) $display("%s mismatch: got %h exp %h", what, got, exp_w);
    end
  endtask

  initial begin
    en = 1'b0; u_n = 1'b1; v_n = 1'b1;
    {h_in, c_in, q_in} = '0; d_in = '0; r_in = '0;
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    for (int grp = 0; grp < 300; grp++) begin
      int nw;
      nw = 1 + ($urandom % 5);
      for (int t = 0; t < nw; t++) begin
        logic [LW:0] dg, rg;
        @(negedge clk);
        en   = 1'b1;
        u_n  = (t != 0);
        v_n  = ($urandom % 3) != 0;
        h_in = rnd(); c_in = rnd(); q_in = rnd();
        d_in = {1'($urandom), rnd()};
        r_in = {1'($urandom), rnd()};
        #1;
        if (!u_n) begin
          m_d = d_in[LW];
          m_r = r_in[LW];
        end
        dg = {d_in[LW:1], d_in[0] & v_n};
        rg = {r_in[LW:1], r_in[0] & v_n};
        check("P", p_out, c_in ^ (m_d ? h_in : '0) ^ dg[LW-1:0]);
        check("S", s_out, q_in ^ (m_r ? h_in : '0) ^ rg[LW-1:0]);
      end
    end
    // pass gates closed: only the held d_{k-1}, r_{k-1} terms remain
    for (int t = 0; t < 20; t++) begin
      @(negedge clk);
      en = 1'b0; u_n = 1'b1; v_n = 1'b1;
      h_in = rnd(); c_in = rnd(); q_in = rnd();
      d_in = {1'($urandom), rnd()}; r_in = {1'($urandom), rnd()};
      #1;
      check("P closed", p_out, m_d ? h_in : '0);
      check("S closed", s_out, m_r ? h_in : '0);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
