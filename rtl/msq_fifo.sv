// msq_fifo -- fixed-delay FIFO buffer of the multiplier-squarer.
//
// A chain of DEPTH registers of W bits. While en = 1 every clock edge pushes
// din in and moves each word one place on, so a word pushed at the end of
// cycle n is at dout during cycle n+DEPTH. clr (synchronous, takes priority)
// fills the buffer with zero words; the design uses this to supply the
// initial zero words of C, D, Q and R. Sizes used by the core: l bits x L
// words (FIFO-C/D/Q/R/H/H'/A), 2 bits x L-1 words (FIFO-a) and 1 bit x L-1
// words (FIFO-dd/rd), as in the published core. Building them as shift
// registers, and the clear and enable inputs, are this design's choices.
module msq_fifo #(
  parameter int unsigned W     = 32,
  parameter int unsigned DEPTH = 13
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         en,
  input  logic         clr,
  input  logic [W-1:0] din,
  output logic [W-1:0] dout
);
  logic [W-1:0] stage [DEPTH];

  if (DEPTH < 1) begin : g_depth_check
    $error("msq_fifo: DEPTH must be at least 1");
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < DEPTH; i++) stage[i] <= '0;
    end else if (clr) begin
      for (int i = 0; i < DEPTH; i++) stage[i] <= '0;
    end else if (en) begin
      stage[0] <= din;
      for (int i = 1; i < DEPTH; i++) stage[i] <= stage[i-1];
    end
  end

  assign dout = stage[DEPTH-1];
endmodule
