// fft_pe: processing element of a 2-D mesh-connected systolic FFT array.
//
// An N-point FFT on a 2^m x 2^n mesh of these PEs runs log2(N) stages; in
// each stage every PE first exchanges data with its neighbours (shuffling)
// and then computes one half-butterfly (HBA): a PE holding f(k) computes
// A/2 + B/2*W and its partner holding f(k+D) computes A/2 - B/2*W, so the
// two halves of a radix-2 DIT butterfly run in two PEs at once and no PE is
// idle.
//
// Inside the PE:
//   - DRU N/W: takes NI or WI (or the PE's own result), drives SO and feeds
//     Reg.A, the coefficient registers and the accumulators' initial load.
//   - DRU S/E: takes SI or EI (or the PE's own result), drives NO and feeds
//     Reg.B.
//   - Reg.A (Ar, Ai), Reg.B (Br, Bi, read bit-serially), Kr/Ki registers.
//   - HBAU: two 8-bit BLC adders doing distributed arithmetic; its
//     accumulators hold the PE's data word between stages and the QSF mux
//     returns either half to both DRUs.
//   - ICL: decodes the 17-bit control input and sequences the 10-clock HBA.
//   - A stand-alone BLC adder test cell with its own pins (t_a, t_b, t_ass,
//     t_s = S8..S0), as placed on the chip for delay measurement.
//
// Interface: all data ports are 8-bit two's complement fractions, one word
// per clock; complex values travel as two words (real, imaginary) under the
// control of the external sequencer through ci. An HBA takes 10 clocks from
// GO (see icl). The self-test output pin of the chip is not modelled.
//
// The block structure, word length, 10-clock HBA and port names follow the
// document; the fields of the control word, which DRU feeds which register,
// the reset and the test adder's pin mapping are this design's choices.
module fft_pe
  import fft_pe_pkg::*;
#(
  parameter int unsigned W = DW
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic [W-1:0] ni,
  input  logic [W-1:0] wi,
  input  logic [W-1:0] ei,
  input  logic [W-1:0] si,
  input  pe_ctrl_t     ci,
  output logic [W-1:0] no,
  output logic [W-1:0] so,
  output logic         busy,
  // BLC adder test cell
  input  logic [7:0]   t_a,
  input  logic [7:0]   t_b,
  input  logic         t_ass,
  output logic [8:0]   t_s
);
  pe_ctrl_t     ext;
  hba_ctrl_t    hba;
  logic [W-1:0] dru_n_q, dru_s_q, to_dru;
  logic [W-1:0] ar, ai, kr, ki, acc_r, acc_i;
  logic         br_bit, bi_bit;

  icl u_icl (.clk, .rst_n, .ci, .ext, .hba, .busy);

  dru #(.W(W)) u_dru_n (
    .clk, .rst_n, .v_in(ni), .h_in(wi), .res_in(to_dru),
    .horiz(ext.n_horiz), .src_res(ext.n_res), .ld(ext.n_ld), .q(dru_n_q)
  );

  dru #(.W(W)) u_dru_s (
    .clk, .rst_n, .v_in(si), .h_in(ei), .res_in(to_dru),
    .horiz(ext.s_horiz), .src_res(ext.s_res), .ld(ext.s_ld), .q(dru_s_q)
  );

  assign so = dru_n_q;
  assign no = dru_s_q;

  reg_a #(.W(W)) u_reg_a (
    .clk, .rst_n, .d(dru_n_q), .lar(ext.lar), .lai(ext.lai),
    .scale(hba.scale), .ar, .ai
  );

  reg_b #(.W(W)) u_reg_b (
    .clk, .rst_n, .d(dru_s_q), .lbr(ext.lbr), .lbi(ext.lbi),
    .scale(hba.scale), .shift(hba.da), .br_bit, .bi_bit
  );

  coef_reg #(.W(W)) u_coef (
    .clk, .rst_n, .d(dru_n_q), .lkr(ext.lkr), .lki(ext.lki), .kr, .ki
  );

  hbau #(.W(W)) u_hbau (
    .clk, .rst_n, .ctl(hba), .br_bit, .bi_bit, .kr, .ki, .ar, .ai,
    .dru(dru_n_q), .ildr(ext.ildr), .ildi(ext.ildi), .qsf(ext.qsf),
    .acc_r, .acc_i, .to_dru
  );

  blc_adder #(.W(8)) u_test_adder (
    .a(t_a), .b(t_b), .cin(t_ass), .s(t_s[7:0]), .cout(t_s[8])
  );

  // Control protocol: GO is only issued while the PE is idle.
  a_go_idle: assert property (@(posedge clk) disable iff (!rst_n) ci.go |-> !busy)
    else $error("GO issued while an HBA is running");
endmodule
