// tb_hbau_half: runs random half-butterflies through the real half (and a
// second instance for the imaginary half) of the HBAU, driving the 10-step
// control sequence and the bit-serial B operand from the testbench, and
// compares each result with the table-driven reference (exact) and with
// the ideal value A/2 & B/2*W where no overflow is possible, within 3 LSB
// (the truncating right shifts and the scaling of A lose up to about 2.5
// LSB together). Counts the cases whose partial sums needed the ninth bit.
// Also checks the initial load of the accumulator from the DRU input.
module tb_hbau_half;
  import fft_pe_pkg::*;
  import hba_ref_pkg::*;

  logic       clk = 0, rst_n = 0;
  hba_ctrl_t  ctl;
  logic       br_bit, bi_bit, ild;
  logic [7:0] kr, ki, a, dru, acc_r, acc_i;
  int checks = 0, failures = 0, v_used = 0;

  hbau_half #(.W(8), .IMAG(1'b0)) dut_r (.clk, .rst_n, .ctl, .br_bit, .bi_bit,
    .kr, .ki, .a, .dru, .ild, .acc(acc_r));
  hbau_half #(.W(8), .IMAG(1'b1)) dut_i (.clk, .rst_n, .ctl, .br_bit, .bi_bit,
    .kr, .ki, .a, .dru, .ild, .acc(acc_i));

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run_hba(input logic [7:0] av, brv, biv, input bit om);
    logic [7:0] bs_r, bs_i;
    bs_r = {brv[7], brv[7:1]};
    bs_i = {biv[7], biv[7:1]};
    @(negedge clk);
    a = {av[7], av[7:1]};
    for (int j = 0; j < 9; j++) begin
      ctl = '0;
      ctl.op_minus = om;
      if (j < 8) begin
        ctl.da = 1; ctl.lx = 1;
        ctl.in = (j == 0); ctl.shs = (j != 0); ctl.sct = (j == 7);
        br_bit = bs_r[j]; bi_bit = bs_i[j];
      end else begin
        ctl.m1 = 1; ctl.lx = 1;
        br_bit = 1'($urandom); bi_bit = 1'($urandom);
      end
      @(negedge clk);
    end
    ctl = '0;
  endtask

  initial begin
    logic [7:0] av, brv, biv, er, ei;
    real ir, ii;
    bit om;
    ctl = '0; br_bit = 0; bi_bit = 0; ild = 0; kr = 0; ki = 0; a = 0; dru = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int i = 0; i < 3000; i++) begin
      av = 8'($urandom); brv = 8'($urandom); biv = 8'($urandom);
      kr = 8'($urandom); ki = 8'($urandom); om = 1'($urandom);
      if (i == 0) begin av = 8'h7f; brv = 8'h80; biv = 8'h80; kr = 8'h5a; ki = 8'h00; end
      run_hba(av, brv, biv, om);
      er = hba_ref(av, brv, biv, kr, ki, om, 1'b0);
      if (last_wide) v_used++;
      ei = hba_ref(av, brv, biv, kr, ki, om, 1'b1);
      checks += 2;
      if (acc_r != er) begin
        failures++;
        if (failures < 10) $display("FAIL re a=%h b=%h,%h k=%h,%h om=%0d got %h exp %h",
                                    av, brv, biv, kr, ki, om, acc_r, er);
      end
      if (acc_i != ei) begin
        failures++;
        if (failures < 10) $display("FAIL im a=%h b=%h,%h k=%h,%h om=%0d got %h exp %h",
                                    av, brv, biv, kr, ki, om, acc_i, ei);
      end
      ir = hba_ideal(av, brv, biv, kr, ki, om, 1'b0);
      ii = hba_ideal(av, brv, biv, kr, ki, om, 1'b1);
      if (ir > -126.0 && ir < 125.0) begin
        checks++;
        if (absr(real'($signed(acc_r)) - ir) > 3.0) begin
          failures++;
          if (failures < 10) $display("FAIL ideal re got %0d exp %f", $signed(acc_r), ir);
        end
      end
      if (ii > -126.0 && ii < 125.0) begin
        checks++;
        if (absr(real'($signed(acc_i)) - ii) > 3.0) failures++;
      end
    end
    // Initial load from the DRU.
    @(negedge clk);
    dru = 8'hA5; ild = 1;
    @(negedge clk);
    ild = 0;
    checks++; if (acc_r != 8'hA5 || acc_i != 8'hA5) failures++;
    checks++; if (v_used == 0) failures++;
    $display("%0d real-half runs needed the ninth (V) bit", v_used);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
