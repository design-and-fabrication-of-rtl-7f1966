// hbau_half: one half (real or imaginary) of the half-butterfly arithmetic
// unit.
//
// It computes Ar & Re{B*W} (IMAG=0) or Ai & Im{B*W} (IMAG=1) by distributed
// arithmetic: instead of multiplying, it walks through the bits of Br and Bi
// from LSB to sign bit and accumulates one of +-Kr, +-Ki per bit, where
// Kr = (Wr+Wi)/2 and Ki = (Wr-Wi)/2:
//
//   real: Kr if Br^Bi, else Ki;   negated if Br=0      (Table I, n != 0)
//   imag: Ki if Br^Bi, else Kr;   negated if Bi=0
//   sign bit (SCT): the sign is reversed
//   first step (IN): the constant term -2^-(W-1)*Ki (real) or
//                    -2^-(W-1)*Kr (imag) enters the adder in place of the
//                    fed-back accumulator
//   other steps (SHS): accumulator fed back shifted right one bit
//   final step (M1): scaled Ar (Ai) enters the adder, no shift
//
// The operator '&' (op_minus) is folded into the coefficient signs: for
// HBA- every coefficient and the constant term are negated, so the final
// step is always an addition. Negation of a coefficient is the A/S block:
// bitwise inversion with carry-in 1. The negated constant term is entered
// as the bitwise inverse alone; the missing 2^-(W-1) at the weight of the
// first step is shifted out before the result.
//
// The adder sum can need W+1 bits during the accumulation; the extra bit V
// (true sign of the sum) is kept next to the accumulator and shifted into
// its MSB by the right shifter. ild loads the accumulator from the DRU
// (initial data) instead of the adder.
//
// Timing: one adder pass per clock; the accumulator updates at the rising
// edge where lx (or ild) is high. The mux/adder/accumulator/shifter
// structure, Table I and the IN/SCT/M1/SHS steps follow the document; the
// V bit handling, the sign folding of '&' and the inverted constant term
// are this design's reading of the block diagram.
module hbau_half
  import fft_pe_pkg::*;
#(
  parameter int unsigned W    = 8,
  parameter bit          IMAG = 1'b0
) (
  input  logic         clk,
  input  logic         rst_n,
  input  hba_ctrl_t    ctl,
  input  logic         br_bit,   // current bit of Br
  input  logic         bi_bit,   // current bit of Bi
  input  logic [W-1:0] kr,
  input  logic [W-1:0] ki,
  input  logic [W-1:0] a,        // scaled Ar (real) or Ai (imag)
  input  logic [W-1:0] dru,      // initial data from the DRU
  input  logic         ild,      // initial load of the accumulator
  output logic [W-1:0] acc
);
  logic         v;               // true sign of the last adder sum
  logic         sel_kr, sub, cin, cout, v_new;
  logic [W-1:0] coef, as_out, off, x, y, s, fb;

  always_comb begin
    // Coefficient selection (XOR / XNOR of the two B bits).
    sel_kr = IMAG ? ~(br_bit ^ bi_bit) : (br_bit ^ bi_bit);
    coef   = sel_kr ? kr : ki;
    // Sign: from Br (real) or Bi (imag), reversed at the sign bit and for '-'.
    sub    = ~(IMAG ? bi_bit : br_bit) ^ ctl.sct ^ ctl.op_minus;
    // A/S block.
    as_out = sub ? ~coef : coef;
    // Constant term of the first step.
    off    = IMAG ? kr : ki;
    // Right shifter on the accumulator feedback.
    fb     = ctl.shs ? {v, acc[W-1:1]} : acc;
    // Adder operands.
    x      = ctl.in ? (ctl.op_minus ? off : ~off) : fb;
    y      = ctl.m1 ? a : as_out;
    cin    = ctl.m1 ? 1'b0 : sub;
    // Extended sign of the W+1 bit sum.
    v_new  = x[W-1] ^ y[W-1] ^ cout;
  end

  blc_adder #(.W(W)) u_add (
    .a(x), .b(y), .cin(cin), .s(s), .cout(cout)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      acc <= '0;
      v   <= 1'b0;
    end else if (ild) begin
      acc <= dru;
      v   <= dru[W-1];
    end else if (ctl.lx) begin
      acc <= s;
      v   <= v_new;
    end
  end
endmodule
