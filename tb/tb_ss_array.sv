// tb_ss_array -- random-word check of the semi-systolic array at l = 32.
// Words are applied in groups as in the core: the first word of a group
// with u_n = 0 (the leftmost PE broadcasts a_{k-1}, a_{k-2}), the others with
// u_n = 1 (the keeper must hold those bits). v_n is random. The expected
// words are formed at word level: A' = (A_in << 2 with the low bits gated)
// ^ a_{k-2}*H ^ a_{k-1}*H', C' = C ^ b_{2i-2}*A, etc. The test also checks
// that the broadcast bits keep their value across a group.
module tb_ss_array;
  localparam int LW = 32;
  logic          clk = 1'b0, rst_n = 1'b0, u_n, v_n;
  logic [LW+1:0] a_in;
  logic [LW-1:0] h_in, hp_in, c_in, d_in, q_in, r_in;
  logic          b_e, b_o, a_e, a_o;
  logic [LW-1:0] a_out, h_out, hp_out, c_out, d_out, q_out, r_out;
  logic [1:0]    ad_ae;
  int checks = 0, failures = 0, holds = 0;
  logic m_km1 = 1'b0, m_km2 = 1'b0;   // model of the broadcast line

  ss_array #(.LW(LW)) dut (.*);

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
    u_n = 1'b1; v_n = 1'b1; a_in = '0; {h_in, hp_in, c_in, d_in, q_in, r_in} = '0;
    {b_e, b_o, a_e, a_o} = '0;
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    for (int grp = 0; grp < 300; grp++) begin
      int nw;
      nw = 1 + ($urandom % 5);
      {b_e, b_o, a_e, a_o} = 4'($urandom);
      for (int t = 0; t < nw; t++) begin
        logic [LW+1:0] ag;
        logic [LW-1:0] aw, exp_a;
        @(negedge clk);
        u_n  = (t != 0);
        v_n  = ($urandom % 3) != 0;
        a_in = {2'($urandom), rnd()};
        h_in = rnd(); hp_in = rnd();
        c_in = rnd(); d_in = rnd(); q_in = rnd(); r_in = rnd();
        #1;
        if (!u_n) begin
          m_km1 = a_in[LW+1];
          m_km2 = a_in[LW];
        end else begin
          holds++;
        end
        ag    = a_in & ~{{LW{1'b0}}, ~v_n, ~v_n};
        aw    = ag[LW+1:2];
        exp_a = ag[LW-1:0] ^ (m_km2 ? h_in : '0) ^ (m_km1 ? hp_in : '0);
        check("A", a_out, exp_a);
        check("C", c_out, c_in ^ (b_e ? aw : '0));
        check("D", d_out, d_in ^ (b_o ? aw : '0));
        check("Q", q_out, q_in ^ (a_e ? aw : '0));
        check("R", r_out, r_in ^ (a_o ? aw : '0));
        check("H", h_out, h_in);
        check("H'", hp_out, hp_in);
        check("ad_ae", LW'(ad_ae), LW'(exp_a[LW-1:LW-2]));
      end
    end
    checks++;
    if (holds == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
