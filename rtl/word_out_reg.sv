// word_out_reg -- result register P or S, filled word by word.
//
// Each load shifts the register LW bits towards the top and puts word in the
// lowest LW bits. After NW loads (most significant word first, as the
// post-processing array delivers them) the register holds the padded result
// and q shows its top K bits; the padding columns at the bottom are dropped.
// The register keeps its value until the next result arrives.
module word_out_reg #(
  parameter int unsigned K  = 409,
  parameter int unsigned LW = 32
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          load,
  input  logic [LW-1:0] word,
  output logic [K-1:0]  q
);
  localparam int unsigned NW = (K + LW - 1) / LW;
  localparam int unsigned RW = NW * LW;

  logic [RW-1:0] sr;

  if (NW > 1) begin : g_multi
    always_ff @(posedge clk or negedge rst_n) begin
      if (!rst_n)    sr <= '0;
      else if (load) sr <= {sr[RW-LW-1:0], word};
    end
  end else begin : g_single
    always_ff @(posedge clk or negedge rst_n) begin
      if (!rst_n)    sr <= '0;
      else if (load) sr <= word;
    end
  end

  assign q = sr[RW-1 -: K];
endmodule
