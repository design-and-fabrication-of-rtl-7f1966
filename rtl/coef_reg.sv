// coef_reg: twiddle coefficient registers Kr and Ki.
//
// The distributed arithmetic does not use Wr and Wi directly but the two
// precomputed coefficients Kr = (Wr + Wi)/2 and Ki = (Wr - Wi)/2. They are
// supplied from outside, through the north/west DRU (twiddle factor loading),
// and each has its own load strobe. Both are W-bit fractions.
//
// Timing: load at the rising clock edge; reset clears both. The Kr/Ki
// definition and the loading through the DRU follow the document. Separate
// load strobes and the reset are this design's choice. The '&' operator is
// applied in the HBAU, so the registers hold plain Kr and Ki.
module coef_reg #(
  parameter int unsigned W = 8
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic [W-1:0] d,
  input  logic         lkr,
  input  logic         lki,
  output logic [W-1:0] kr,
  output logic [W-1:0] ki
);
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      kr <= '0;
      ki <= '0;
    end else begin
      if (lkr) kr <= d;
      if (lki) ki <= d;
    end
  end
endmodule
