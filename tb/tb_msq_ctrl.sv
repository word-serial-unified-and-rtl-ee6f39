// tb_msq_ctrl -- checks the controller's strobes against the operating
// sequence, time instance by time instance, for k = 409, l = 32 (L = 13,
// g = 205) and for the small example k = 5, l = 3 (L = 2, g = 3):
//   in_sel for 1 <= n <= L; ss u at n = (i-1)L+1 and ss v / bit advance at
//   n = iL (1 <= i <= g); post-processing for gL+1 <= n <= (g+1)L with its u
//   at n = gL+1 and v at n = (g+1)L. busy must last exactly (g+1)L cycles,
//   done must pulse once, and a start while busy must be ignored.
module tb_msq_ctrl;
  import msq_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0, start;
  msq_ctrl_t ctl_big, ctl_small;
  logic busy_big, done_big, busy_small, done_small;
  int checks = 0, failures = 0;

  msq_ctrl #(.NW(13), .G(205)) dut_big (
    .clk, .rst_n, .start, .ctl(ctl_big), .busy(busy_big), .done(done_big));
  msq_ctrl #(.NW(2), .G(3)) dut_small (
    .clk, .rst_n, .start, .ctl(ctl_small), .busy(busy_small), .done(done_small));

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic msq_ctrl_t expected(input int n, input int nw, input int g);
    msq_ctrl_t e;
    e = '0;
    e.fifo_en  = 1'b1;
    e.in_sel   = (n >= 1 && n <= nw);
    e.ss_u_n   = 1'b1;
    e.ss_v_n   = 1'b1;
    e.pp_u_n   = 1'b1;
    e.pp_v_n   = 1'b1;
    for (int i = 1; i <= g; i++) begin
      if (n == (i - 1) * nw + 1) e.ss_u_n = 1'b0;
      if (n == i * nw) begin e.ss_v_n = 1'b0; e.bits_adv = 1'b1; end
    end
    e.pp_en    = (n >= g * nw + 1) && (n <= (g + 1) * nw);
    e.out_load = e.pp_en;
    if (n == g * nw + 1)   e.pp_u_n = 1'b0;
    if (n == (g + 1) * nw) e.pp_v_n = 1'b0;
    return e;
  endfunction

  task automatic run(input bit big);
    int nw, g, n, dones;
    nw = big ? 13 : 2;
    g  = big ? 205 : 3;
    @(negedge clk);
    start = 1'b1;
    #1;
    checks++;
    if (big ? !(ctl_big.load && ctl_big.fifo_clr) : !(ctl_small.load && ctl_small.fifo_clr)) begin
      failures++;
      $display("load/clear missing at start");
    end
    @(negedge clk);
    n = 1; dones = 0;
    // keep start high for a while: it must be ignored while busy
    while (big ? busy_big : busy_small) begin
      msq_ctrl_t got, e;
      start = (n < 5);
      #1;
      got = big ? ctl_big : ctl_small;
      e   = expected(n, nw, g);
      checks++;
      if (got !== e) begin
        failures++;
        if (failures < 10) $display("n=%0d got %b exp %b", n, got, e);
      end
      @(negedge clk);
      n++;
    end
    start = 1'b0;
    checks++;
    if (n - 1 != (g + 1) * nw) begin
      failures++;
      $display("busy lasted %0d cycles, expected %0d", n - 1, (g + 1) * nw);
    end
    checks++;
    if (!(big ? done_big : done_small)) begin
      failures++;
      $display("done not raised after the operation");
    end
    @(negedge clk);
    checks++;
    if (big ? (done_big || busy_big) : (done_small || busy_small)) begin
      failures++;
      $display("done longer than one cycle or restart");
    end
  endtask

  initial begin
    start = 1'b0;
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    // small first; the big instance is started too but is checked next
    run(1'b0);
    wait (!busy_big);
    @(negedge clk);
    run(1'b1);
    wait (!busy_small);
    run(1'b0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
