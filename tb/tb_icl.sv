// tb_icl: checks the HBA sequence of the internal control logic step by
// step (scale, IN, SHS, SCT, M1, LX), its 10-cycle length, the latching of
// the operator at GO, that GO is ignored while busy, and that the operand,
// coefficient and accumulator loads are blocked while busy and passed
// through otherwise.
module tb_icl;
  import fft_pe_pkg::*;

  logic      clk = 0, rst_n = 0;
  pe_ctrl_t  ci, ext;
  hba_ctrl_t hba;
  logic      busy;
  int checks = 0, failures = 0;

  icl dut (.clk, .rst_n, .ci, .ext, .hba, .busy);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(input bit cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      if (failures < 10) $display("FAIL %s", what);
    end
  endtask

  initial begin
    pe_ctrl_t r;
    bit om;
    int cycles;
    ci = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int it = 0; it < 200; it++) begin
      // Idle: strobes pass through unchanged, no HBA activity.
      @(negedge clk);
      r = pe_ctrl_t'($urandom);
      r.go = 1'b0;
      ci = r;
      #1;
      chk(ext == r, "idle pass-through");
      chk(!busy && hba.lx == 0 && hba.scale == 0 && hba.da == 0, "idle quiet");
      // Start.
      om = 1'($urandom);
      @(negedge clk);
      ci = '0; ci.go = 1'b1; ci.op_minus = om;
      @(negedge clk);
      cycles = 0;
      for (int s = 0; s < 10; s++) begin
        r = pe_ctrl_t'($urandom);
        r.op_minus = ~om;            // must not change the latched operator
        ci = r;
        #1;
        chk(busy, "busy during HBA");
        chk(hba.op_minus == om, "operator latched");
        chk(hba.scale == (s == 0), "scale step");
        chk(hba.da == (s >= 1 && s <= 8), "da steps");
        chk(hba.in == (s == 1), "IN step");
        chk(hba.shs == (s >= 2 && s <= 8), "SHS steps");
        chk(hba.sct == (s == 8), "SCT step");
        chk(hba.m1 == (s == 9), "M1 step");
        chk(hba.lx == (s >= 1), "LX steps");
        chk(!ext.go && !ext.lar && !ext.lai && !ext.lbr && !ext.lbi &&
            !ext.lkr && !ext.lki && !ext.ildr && !ext.ildi, "loads blocked");
        chk(ext.qsf == r.qsf && ext.n_ld == r.n_ld && ext.s_ld == r.s_ld &&
            ext.n_res == r.n_res && ext.s_horiz == r.s_horiz, "DRU controls pass");
        cycles++;
        @(negedge clk);
      end
      ci = '0;
      #1;
      chk(!busy, "idle after 10 cycles");
      chk(cycles == HBA_CYCLES, "HBA length 10 cycles");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
