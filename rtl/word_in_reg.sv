// word_in_reg -- operand input register read out word by word.
//
// On load it captures a k-bit operand, appends GAMMA = NW*LW - K zero bits
// below it (the padding columns of the schedule) and EXTRA further zero bits.
// word always shows the top LW+EXTRA bits; each shift moves the register LW
// bits towards the top, so successive cycles present the words most
// significant first. With EXTRA = 2 (operand A) every word carries the two
// most significant bits of the next lower word, which the semi-systolic
// array needs in its two rightmost PEs. The published core shows full-width
// registers A, H, H' feeding the array through multiplexers; loading them in
// parallel and reading them as a shift register is this design's choice.
module word_in_reg #(
  parameter int unsigned K     = 409,
  parameter int unsigned LW    = 32,
  parameter int unsigned EXTRA = 0
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                load,
  input  logic                shift,
  input  logic [K-1:0]        d,
  output logic [LW+EXTRA-1:0] word
);
  localparam int unsigned NW    = (K + LW - 1) / LW;
  localparam int unsigned GAMMA = NW * LW - K;
  localparam int unsigned RW    = NW * LW + EXTRA;

  logic [RW-1:0] sr;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)      sr <= '0;
    else if (load)   sr <= {d, {(GAMMA + EXTRA){1'b0}}};
    else if (shift)  sr <= sr << LW;
  end

  assign word = sr[RW-1 -: LW + EXTRA];
endmodule
