// bit_sched -- the four broadcast bits of each iteration.
//
// Iteration i of the loop needs b_{2i-2}, b_{2i-1} (multiplier B) and
// a_{2i-2}, a_{2i-1} (operand A, for the squaring) on every cycle of the
// iteration. On load the module captures A and B; its outputs are then bits
// 0 and 1 of each, and adv (pulsed at the end of an iteration) shifts both
// registers down by two, so the next pair appears. Bits past k-1 read as
// zero, which gives b_k = a_k = 0 in the last iteration when k is odd. The
// low bits of the two registers play the part of the four D flip-flops of
// the published core; the shift registers behind them are this design's
// choice, as the source of those bits is not shown.
module bit_sched #(
  parameter int unsigned K = 409
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         load,
  input  logic         adv,
  input  logic [K-1:0] a,
  input  logic [K-1:0] b,
  output logic         b_e,   // b_{2i-2}
  output logic         b_o,   // b_{2i-1}
  output logic         a_e,   // a_{2i-2}
  output logic         a_o    // a_{2i-1}
);
  logic [K+1:0] a_sr, b_sr;   // two spare zero bits so that K = 1 works

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      a_sr <= '0;
      b_sr <= '0;
    end else if (load) begin
      a_sr <= {2'b00, a};
      b_sr <= {2'b00, b};
    end else if (adv) begin
      a_sr <= a_sr >> 2;
      b_sr <= b_sr >> 2;
    end
  end

  assign b_e = b_sr[0];
  assign b_o = b_sr[1];
  assign a_e = a_sr[0];
  assign a_o = a_sr[1];
endmodule
