// tb_hbau: random complex half-butterflies through the HBAU. The testbench
// plays the operand registers (scaled A, bit-serial B/2) and the 10-step
// control sequence, and checks both accumulators against the table-driven
// reference and the ideal A/2 & B/2*W (within 3 LSB), then checks the QSF
// output multiplexer and the separate initial loads of the two halves.
module tb_hbau;
  import fft_pe_pkg::*;
  import hba_ref_pkg::*;

  logic       clk = 0, rst_n = 0;
  hba_ctrl_t  ctl;
  logic       br_bit, bi_bit, ildr, ildi, qsf;
  logic [7:0] kr, ki, ar, ai, dru, acc_r, acc_i, to_dru;
  int checks = 0, failures = 0;

  hbau #(.W(8)) dut (.clk, .rst_n, .ctl, .br_bit, .bi_bit, .kr, .ki, .ar, .ai,
    .dru, .ildr, .ildi, .qsf, .acc_r, .acc_i, .to_dru);

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run_hba(input logic [7:0] a_r, a_i, brv, biv, input bit om);
    logic [7:0] bs_r, bs_i;
    bs_r = {brv[7], brv[7:1]};
    bs_i = {biv[7], biv[7:1]};
    @(negedge clk);
    ar = {a_r[7], a_r[7:1]};
    ai = {a_i[7], a_i[7:1]};
    for (int j = 0; j < 9; j++) begin
      ctl = '0;
      ctl.op_minus = om;
      ctl.lx = 1;
      if (j < 8) begin
        ctl.da = 1; ctl.in = (j == 0); ctl.shs = (j != 0); ctl.sct = (j == 7);
        br_bit = bs_r[j]; bi_bit = bs_i[j];
      end else begin
        ctl.m1 = 1;
      end
      @(negedge clk);
    end
    ctl = '0;
  endtask

  task automatic chk(input logic [7:0] got, exp, input string what);
    checks++;
    if (got != exp) begin
      failures++;
      if (failures < 10) $display("FAIL %s got %h exp %h", what, got, exp);
    end
  endtask

  initial begin
    logic [7:0] a_r, a_i, brv, biv;
    real id;
    bit om;
    ctl = '0; br_bit = 0; bi_bit = 0; ildr = 0; ildi = 0; qsf = 0;
    kr = 0; ki = 0; ar = 0; ai = 0; dru = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int i = 0; i < 2000; i++) begin
      a_r = 8'($urandom); a_i = 8'($urandom); brv = 8'($urandom); biv = 8'($urandom);
      kr = 8'($urandom); ki = 8'($urandom); om = 1'($urandom);
      run_hba(a_r, a_i, brv, biv, om);
      chk(acc_r, hba_ref(a_r, brv, biv, kr, ki, om, 1'b0), "re");
      chk(acc_i, hba_ref(a_i, brv, biv, kr, ki, om, 1'b1), "im");
      id = hba_ideal(a_r, brv, biv, kr, ki, om, 1'b0);
      if (id > -125.0 && id < 124.0) begin
        checks++;
        if (absr(real'($signed(acc_r)) - id) > 3.0) failures++;
      end
      id = hba_ideal(a_i, brv, biv, kr, ki, om, 1'b1);
      if (id > -125.0 && id < 124.0) begin
        checks++;
        if (absr(real'($signed(acc_i)) - id) > 3.0) failures++;
      end
      qsf = 1'b0; #1; chk(to_dru, acc_r, "qsf=0");
      qsf = 1'b1; #1; chk(to_dru, acc_i, "qsf=1");
    end
    // Separate initial loads.
    @(negedge clk); dru = 8'h3C; ildr = 1;
    @(negedge clk); ildr = 0; dru = 8'hC3; ildi = 1;
    @(negedge clk); ildi = 0;
    chk(acc_r, 8'h3C, "ildr");
    chk(acc_i, 8'hC3, "ildi");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
