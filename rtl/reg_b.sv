// reg_b: operand register B of the half-butterfly, holding Br and Bi.
//
// The distributed arithmetic reads B one bit position at a time, so Reg.B
// is a pair of shift registers that present one bit of Br and one bit of Bi
// (br_bit, bi_bit: the current least significant bits) to the HBAU. Each
// half is loaded in parallel from the south/east DRU (lbr, lbi). The scale
// strobe shifts both halves right by one with sign extension (divide by
// two, the per-stage scaling); each shift strobe then moves the next more
// significant bit into place, so eight shifts walk from bit n=7 (LSB) to
// bit n=0 (sign). Shifting is arithmetic, so the register keeps the sign.
//
// Timing: all changes at the rising clock edge; reset clears both halves.
// Priority scale > shift > load is this design's choice.
module reg_b #(
  parameter int unsigned W = 8
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic [W-1:0] d,       // from the S/E DRU
  input  logic         lbr,     // load Br
  input  logic         lbi,     // load Bi
  input  logic         scale,   // Br, Bi <= Br/2, Bi/2
  input  logic         shift,   // next bit position
  output logic         br_bit,
  output logic         bi_bit
);
  logic [W-1:0] br, bi;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      br <= '0;
      bi <= '0;
    end else if (scale || shift) begin
      br <= {br[W-1], br[W-1:1]};
      bi <= {bi[W-1], bi[W-1:1]};
    end else begin
      if (lbr) br <= d;
      if (lbi) bi <= d;
    end
  end

  assign br_bit = br[0];
  assign bi_bit = bi[0];
endmodule
