// reg_a: operand register A of the half-butterfly, holding Ar and Ai.
//
// Each half is loaded from the north/west DRU by its own load strobe (lar,
// lai). Before the distributed arithmetic starts, the scale strobe shifts
// both halves right by one bit with sign extension, which is the
// divide-by-two of the step-by-step scaling applied at every butterfly
// stage. Scaling has priority over loading. The scaled A enters the adder
// in the final '&' step of the HBA.
//
// Timing: all changes at the rising clock edge; reset clears both halves.
// Loading and scaling follow the document; the priority and reset are this
// design's choices.
module reg_a #(
  parameter int unsigned W = 8
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic [W-1:0] d,       // from the N/W DRU
  input  logic         lar,     // load Ar
  input  logic         lai,     // load Ai
  input  logic         scale,   // Ar, Ai <= Ar/2, Ai/2
  output logic [W-1:0] ar,
  output logic [W-1:0] ai
);
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      ar <= '0;
      ai <= '0;
    end else if (scale) begin
      ar <= {ar[W-1], ar[W-1:1]};
      ai <= {ai[W-1], ai[W-1:1]};
    end else begin
      if (lar) ar <= d;
      if (lai) ai <= d;
    end
  end
endmodule
