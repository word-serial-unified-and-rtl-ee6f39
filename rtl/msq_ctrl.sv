// msq_ctrl -- time-instance controller of the multiplier-squarer.
//
// A start pulse while idle loads the operands and clears FIFO-C/D/Q/R in the
// same clock edge; the next cycle is time instance n = 1. The controller
// counts n as an iteration number i (1 .. g+1) and a word number t
// (0 .. L-1, most significant word first), n = (i-1)*L + t + 1, and decodes
// the strobes the published operating sequence prescribes:
//   n = 1 .. L             in_sel: M_a, M_h, M_h' take the input registers
//   t = 0,   i <= g        ss_u_n = 0: broadcast a_{k-1}, a_{k-2}
//   t = L-1, i <= g        ss_v_n = 0: zero a_{-1}, a_{-2}; next bit pair
//   i = g+1                post-processing: pp_en, P/S register load
//   t = 0,   i = g+1       pp_u_n = 0: broadcast d_{k-1}, r_{k-1}
//   t = L-1, i = g+1       pp_v_n = 0: zero d_{-1}, r_{-1}
// After n = (g+1)*L busy falls and done pulses for one cycle, with P and S
// complete in their registers. start is ignored while busy. The counters,
// the start/busy/done handshake and the idle behaviour are this design's
// choice: the operating sequence fixes only the timing of the strobes.
module msq_ctrl
  import msq_pkg::*;
#(
  parameter int unsigned NW = 13,   // L = ceil(k/l)
  parameter int unsigned G  = 205   // g = ceil(k/2)
) (
  input  logic      clk,
  input  logic      rst_n,
  input  logic      start,
  output msq_ctrl_t ctl,
  output logic      busy,
  output logic      done
);
  localparam int unsigned IW = $clog2(G + 2);
  localparam int unsigned TW = (NW > 1) ? $clog2(NW) : 1;

  logic [IW-1:0] iter;   // i
  logic [TW-1:0] t;      // word within the iteration
  logic          ss, pp, first_w, last_w;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy <= 1'b0;
      done <= 1'b0;
      iter <= IW'(1);
      t    <= '0;
    end else begin
      done <= 1'b0;
      if (!busy) begin
        if (start) begin
          busy <= 1'b1;
          iter <= IW'(1);
          t    <= '0;
        end
      end else if (last_w) begin
        t <= '0;
        if (iter == IW'(G + 1)) begin
          busy <= 1'b0;
          done <= 1'b1;
        end else begin
          iter <= iter + 1'b1;
        end
      end else begin
        t <= t + 1'b1;
      end
    end
  end

  always_comb begin
    first_w      = (t == '0);
    last_w       = (t == TW'(NW - 1));
    ss           = busy && (iter <= IW'(G));
    pp           = busy && (iter == IW'(G + 1));
    ctl.load     = !busy && start;
    ctl.fifo_clr = !busy && start;
    ctl.fifo_en  = busy;
    ctl.in_sel   = ss && (iter == IW'(1));
    ctl.ss_u_n   = !(ss && first_w);
    ctl.ss_v_n   = !(ss && last_w);
    ctl.bits_adv = ss && last_w;
    ctl.pp_en    = pp;
    ctl.pp_u_n   = !(pp && first_w);
    ctl.pp_v_n   = !(pp && last_w);
    ctl.out_load = pp;
  end

  // the counters stay inside the schedule
  a_iter_range: assert property (@(posedge clk) disable iff (!rst_n)
    busy |-> (iter >= IW'(1)) && (iter <= IW'(G + 1)) && (t <= TW'(NW - 1)));
endmodule
