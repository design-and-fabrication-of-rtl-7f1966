// hbau: half-butterfly arithmetic unit (HBAU).
//
// Computes one half-butterfly of a radix-2 decimation-in-time FFT,
//   HBA = A/2 & B/2 * W      ('&' is '+' for HBA+ and '-' for HBA-),
// on 8-bit complex fixed-point data, using distributed arithmetic so that
// the only arithmetic is one adder per half (real and imaginary). The two
// halves run in lockstep under the same control; each keeps its result in
// its accumulator, which also serves as the PE's data store between
// butterfly stages. The QSF multiplexer picks which accumulator goes out to
// the data routing units.
//
// Timing: driven by the internal control logic, one HBA takes 10 clocks
// (1 scaling, 8 distributed-arithmetic steps, 1 final add); the scaling
// itself happens in the operand registers outside this block. The result is
// in acc_r/acc_i after the 10th rising edge.
module hbau
  import fft_pe_pkg::*;
#(
  parameter int unsigned W = 8
) (
  input  logic         clk,
  input  logic         rst_n,
  input  hba_ctrl_t    ctl,
  input  logic         br_bit,
  input  logic         bi_bit,
  input  logic [W-1:0] kr,
  input  logic [W-1:0] ki,
  input  logic [W-1:0] ar,      // scaled Ar
  input  logic [W-1:0] ai,      // scaled Ai
  input  logic [W-1:0] dru,     // from DRU, for the initial load
  input  logic         ildr,
  input  logic         ildi,
  input  logic         qsf,     // 0: real accumulator to DRU, 1: imaginary
  output logic [W-1:0] acc_r,
  output logic [W-1:0] acc_i,
  output logic [W-1:0] to_dru
);
  hbau_half #(.W(W), .IMAG(1'b0)) u_re (
    .clk, .rst_n, .ctl, .br_bit, .bi_bit, .kr, .ki,
    .a(ar), .dru, .ild(ildr), .acc(acc_r)
  );

  hbau_half #(.W(W), .IMAG(1'b1)) u_im (
    .clk, .rst_n, .ctl, .br_bit, .bi_bit, .kr, .ki,
    .a(ai), .dru, .ild(ildi), .acc(acc_i)
  );

  assign to_dru = qsf ? acc_i : acc_r;
endmodule
