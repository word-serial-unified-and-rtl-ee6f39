// tb_msq_core_configs -- the multiplier-squarer at other sizes:
//   k = 5,   l = 3  the worked example of the schedule (L = 2, one padding
//                   column), all 1024 operand pairs, H = x^5 + x^2 + 1
//   k = 8,   l = 4  even k, no padding
//   k = 7,   l = 2  odd k, four words
//   k = 163, l = 16 NIST field size, 13 padding columns
//   k = 233, l = 32
//   k = 409, l = 16 and l = 8, the other word sizes evaluated for k = 409
// Random operands and field polynomials; results and latencies checked by
// msq_core_harness.
module tb_msq_core_configs;
  logic clk = 1'b0, rst_n = 1'b0;
  logic [6:0] fin;
  int c [7], f [7];

  always #5 clk = ~clk;

  msq_core_harness #(.K(5),   .LW(3),  .EXHAUSTIVE(1'b1), .H_FIXED(5'b00101))
    u0 (.clk, .rst_n, .fin(fin[0]), .checks(c[0]), .failures(f[0]));
  msq_core_harness #(.K(8),   .LW(4),  .NOPS(200))
    u1 (.clk, .rst_n, .fin(fin[1]), .checks(c[1]), .failures(f[1]));
  msq_core_harness #(.K(7),   .LW(2),  .NOPS(200))
    u2 (.clk, .rst_n, .fin(fin[2]), .checks(c[2]), .failures(f[2]));
  msq_core_harness #(.K(163), .LW(16), .NOPS(40))
    u3 (.clk, .rst_n, .fin(fin[3]), .checks(c[3]), .failures(f[3]));
  msq_core_harness #(.K(233), .LW(32), .NOPS(40))
    u4 (.clk, .rst_n, .fin(fin[4]), .checks(c[4]), .failures(f[4]));
  msq_core_harness #(.K(409), .LW(16), .NOPS(6))
    u5 (.clk, .rst_n, .fin(fin[5]), .checks(c[5]), .failures(f[5]));
  msq_core_harness #(.K(409), .LW(8),  .NOPS(3))
    u6 (.clk, .rst_n, .fin(fin[6]), .checks(c[6]), .failures(f[6]));

  int checks = 0, failures = 0;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired, finished: %b", fin);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    wait (&fin);
    foreach (c[i]) begin
      checks += c[i];
      failures += f[i];
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
