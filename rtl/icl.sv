// icl: internal control logic of the PE.
//
// Takes the 17-bit control input and produces the gated control signals of
// the chip. A GO pulse while idle starts one half-butterfly; the ICL then
// runs through its 10 steps on its own, one per clock:
//
//   step 0      scale   A and B shifted right one bit (LAR/LAI pulse)
//   step 1      IN      first DA step, constant term enters the adder
//   steps 2..7  SHS     DA steps with the accumulator fed back shifted
//   step 8      SHS+SCT last DA step, on the sign bit of B
//   step 9      M1      accumulator + scaled A (the '&' operation)
//
// LXR/LXI (ctl.lx) is high in steps 1..9. The operator '&' is latched at GO.
// While an HBA runs, GO is ignored and the loads of the operand, coefficient
// and accumulator registers are blocked (returned as 0 in ext), since those
// registers are in use; DRU selects, DRU loads and QSF pass through, so data
// shuffling can overlap the arithmetic.
//
// Timing: GO is sampled at a rising edge; step 0 is the following clock
// cycle; the result is in the accumulators after the 10th edge after GO,
// and busy is low again from then on. The step sequence follows the
// document; the blocking of loads and the GO protocol are this design's.
module icl
  import fft_pe_pkg::*;
(
  input  logic      clk,
  input  logic      rst_n,
  input  pe_ctrl_t  ci,
  output pe_ctrl_t  ext,     // external strobes, gated
  output hba_ctrl_t hba,     // HBA sequence
  output logic      busy
);
  logic [3:0] step;
  logic       op_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy <= 1'b0;
      step <= '0;
      op_q <= 1'b0;
    end else if (!busy) begin
      if (ci.go) begin
        busy <= 1'b1;
        step <= '0;
        op_q <= ci.op_minus;
      end
    end else begin
      if (step == 4'(HBA_CYCLES - 1)) begin
        busy <= 1'b0;
        step <= '0;
      end else begin
        step <= step + 4'd1;
      end
    end
  end

  always_comb begin
    hba          = '0;
    hba.op_minus = op_q;
    if (busy) begin
      hba.scale = (step == 4'd0);
      hba.da    = (step >= 4'd1) && (step <= 4'd8);
      hba.in    = (step == 4'd1);
      hba.shs   = (step >= 4'd2) && (step <= 4'd8);
      hba.sct   = (step == 4'd8);
      hba.m1    = (step == 4'd9);
      hba.lx    = (step >= 4'd1);
    end

    ext = ci;
    if (busy) begin
      ext.go   = 1'b0;
      ext.lar  = 1'b0;
      ext.lai  = 1'b0;
      ext.lbr  = 1'b0;
      ext.lbi  = 1'b0;
      ext.lkr  = 1'b0;
      ext.lki  = 1'b0;
      ext.ildr = 1'b0;
      ext.ildi = 1'b0;
    end
  end
endmodule
