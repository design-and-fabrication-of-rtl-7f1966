// tb_fft_pe: end-to-end test of the processing element at its default
// size, as a pair of PEs that together compute radix-2 butterflies the way
// the mesh array does.
//
// PE0 sits north of PE1: PE0's south output feeds PE1's north input and
// PE1's north output feeds PE0's south input. Twiddle coefficients and the
// initial data words enter each PE from the west (horizontal path of the
// DRU) and go into the coefficient registers and, by initial load, into the
// accumulators. Each butterfly stage then:
//   1. sends each PE's own word (real, then imaginary, chosen by QSF) into
//      its DRU and across to the partner over the vertical links,
//   2. loads A (=f(k), held by PE0) and B (=f(k+D), held by PE1) in both,
//   3. starts HBA+ in PE0 and HBA- in PE1 together,
// and the results are read back through the DRUs onto SO (PE0) and NO
// (PE1). Two stages run back to back so the second works on the first's
// results. Results are compared with the table-driven reference and the
// ideal butterfly; the HBA must take exactly 10 clocks. An operand load
// issued while the HBA runs must be ignored. The on-chip test adder is
// checked too. Each mechanism is counted and must occur at least once.
module tb_fft_pe;
  import fft_pe_pkg::*;
  import hba_ref_pkg::*;

  logic       clk = 0, rst_n = 0;
  logic [7:0] w0, w1, so0, no0, so1, no1, zero;
  pe_ctrl_t   c0, c1;
  logic       busy0, busy1;
  logic [7:0] t_a, t_b;
  logic       t_ass;
  logic [8:0] t_s0, t_s1;
  int checks = 0, failures = 0;
  int n_horiz = 0, n_vert = 0, n_res = 0, n_ild = 0, n_qsf_re = 0, n_qsf_im = 0;
  int n_plus = 0, n_minus = 0, n_wide = 0, n_blocked = 0, n_tadd = 0;

  assign zero = 8'h00;

  fft_pe pe0 (.clk, .rst_n, .ni(zero), .wi(w0), .ei(zero), .si(no1), .ci(c0),
              .no(no0), .so(so0), .busy(busy0),
              .t_a, .t_b, .t_ass, .t_s(t_s0));
  fft_pe pe1 (.clk, .rst_n, .ni(so0), .wi(w1), .ei(zero), .si(zero), .ci(c1),
              .no(no1), .so(so1), .busy(busy1),
              .t_a(~t_a), .t_b(~t_b), .t_ass(~t_ass), .t_s(t_s1));

  always #25 clk = ~clk;   // 20 MHz

  initial begin
    repeat (200000) @(posedge clk);
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

  // One clock with the given controls, applied after the falling edge.
  task automatic cyc(input pe_ctrl_t a, input pe_ctrl_t b);
    @(negedge clk);
    c0 = a; c1 = b;
    @(posedge clk); #1;
    c0 = '0; c1 = '0;
  endtask

  // Load a word from the west input into the DRU of both PEs.
  task automatic west(input logic [7:0] v0, input logic [7:0] v1,
                      input pe_ctrl_t a, input pe_ctrl_t b);
    @(negedge clk);
    w0 = v0; w1 = v1;
    c0 = a; c1 = b;
    c0.n_horiz = 1; c0.n_ld = 1; c1.n_horiz = 1; c1.n_ld = 1;
    n_horiz++;
    @(posedge clk); #1;
    c0 = '0; c1 = '0;
  endtask

  task automatic load_twiddle(input logic [7:0] kr, ki);
    pe_ctrl_t a;
    west(kr, kr, '0, '0);
    a = '0; a.lkr = 1;
    west(ki, ki, a, a);
    a = '0; a.lki = 1;
    cyc(a, a);
  endtask

  task automatic load_data(input logic [7:0] f0r, f0i, f1r, f1i);
    pe_ctrl_t a;
    west(f0r, f1r, '0, '0);
    a = '0; a.ildr = 1;
    west(f0i, f1i, a, a);
    a = '0; a.ildi = 1;
    cyc(a, a);
    n_ild += 2;
  endtask

  // Exchange one half (real when im = 0) between the two PEs.
  task automatic exchange(input bit im);
    pe_ctrl_t a, b;
    a = '0; b = '0;
    a.qsf = im; a.n_res = 1; a.n_ld = 1;     // PE0 own word -> DRU N/W
    b.qsf = im; b.s_res = 1; b.s_ld = 1;     // PE1 own word -> DRU S/E
    cyc(a, b);
    n_res += 2;
    if (im) n_qsf_im++; else n_qsf_re++;
    a = '0; b = '0;
    a.s_ld = 1;                               // PE0 takes SI = PE1's word
    b.n_ld = 1;                               // PE1 takes NI = PE0's word
    if (im) begin a.lai = 1; b.lbi = 1; end
    else    begin a.lar = 1; b.lbr = 1; end
    cyc(a, b);
    n_vert += 2;
    a = '0; b = '0;
    if (im) begin a.lbi = 1; b.lai = 1; end
    else    begin a.lbr = 1; b.lar = 1; end
    cyc(a, b);
  endtask

  // Run the HBA in both PEs and count its length.
  task automatic run_hba();
    pe_ctrl_t a, b;
    int len;
    a = '0; b = '0;
    a.go = 1; a.op_minus = 0;
    b.go = 1; b.op_minus = 1;
    cyc(a, b);
    n_plus++; n_minus++;
    len = 0;
    while (busy0) begin
      // Try to overwrite A while busy: must be ignored.
      @(negedge clk);
      if (len == 3) begin
        w0 = 8'h55;
        c0.n_horiz = 1; c0.n_ld = 1;
      end else if (len == 4) begin
        c0.lar = 1; c0.lai = 1; c0.lbr = 1; c0.lkr = 1; c0.ildr = 1;
        n_blocked++;
      end
      chk(busy1 == busy0, "PEs in lockstep");
      @(posedge clk); #1;
      c0 = '0;
      len++;
      if (len > 20) break;
    end
    chk(len == HBA_CYCLES, $sformatf("HBA length %0d clocks", len));
  endtask

  // Read PE0's result on SO and PE1's on NO, real then imaginary.
  task automatic read_out(output logic [7:0] p_r, p_i, m_r, m_i);
    pe_ctrl_t a, b;
    for (int h = 0; h < 2; h++) begin
      a = '0; b = '0;
      a.qsf = h[0]; a.n_res = 1; a.n_ld = 1;
      b.qsf = h[0]; b.s_res = 1; b.s_ld = 1;
      cyc(a, b);
      if (h == 0) begin p_r = so0; m_r = no1; end
      else        begin p_i = so0; m_i = no1; end
    end
  endtask

  task automatic stage(inout logic [7:0] f0r, f0i, f1r, f1i,
                       input logic [7:0] kr, ki);
    logic [7:0] er[4], gr[4];
    real id;
    load_twiddle(kr, ki);
    exchange(1'b0);
    exchange(1'b1);
    run_hba();
    er[0] = hba_ref(f0r, f1r, f1i, kr, ki, 1'b0, 1'b0); n_wide += int'(last_wide);
    er[1] = hba_ref(f0i, f1r, f1i, kr, ki, 1'b0, 1'b1);
    er[2] = hba_ref(f0r, f1r, f1i, kr, ki, 1'b1, 1'b0);
    er[3] = hba_ref(f0i, f1r, f1i, kr, ki, 1'b1, 1'b1);
    read_out(gr[0], gr[1], gr[2], gr[3]);
    for (int k = 0; k < 4; k++) begin
      chk(gr[k] == er[k], $sformatf("result %0d got %h exp %h", k, gr[k], er[k]));
      id = hba_ideal((k % 2) ? f0i : f0r, f1r, f1i, kr, ki, k >= 2, k % 2);
      if (id > -125.0 && id < 124.0)
        chk(absr(real'($signed(gr[k])) - id) < 3.0,
            $sformatf("ideal %0d got %0d exp %f", k, $signed(gr[k]), id));
    end
    f0r = er[0]; f0i = er[1]; f1r = er[2]; f1i = er[3];
  endtask

  initial begin
    logic [7:0] f0r, f0i, f1r, f1i, kr, ki;
    real ang;
    c0 = '0; c1 = '0; w0 = 0; w1 = 0; t_a = 0; t_b = 0; t_ass = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int it = 0; it < 300; it++) begin
      f0r = 8'($urandom); f0i = 8'($urandom); f1r = 8'($urandom); f1i = 8'($urandom);
      load_data(f0r, f0i, f1r, f1i);
      for (int s = 0; s < 2; s++) begin
        // Twiddle W = exp(-j*2*pi*p/16) for a random p, as Kr, Ki.
        ang = -2.0 * 3.14159265358979 * real'($urandom % 16) / 16.0;
        kr = 8'($rtoi(((($cos(ang) + $sin(ang)) / 2.0) * 127.0)));
        ki = 8'($rtoi(((($cos(ang) - $sin(ang)) / 2.0) * 127.0)));
        stage(f0r, f0i, f1r, f1i, kr, ki);
      end
    end
    // Test adder cell.
    for (int i = 0; i < 200; i++) begin
      @(negedge clk);
      t_a = 8'($urandom); t_b = 8'($urandom); t_ass = 1'($urandom);
      #1;
      chk(t_s0 == 9'(t_a + t_b + t_ass), "test adder PE0");
      chk(t_s1 == 9'(8'(~t_a) + 8'(~t_b) + 1'(~t_ass)), "test adder PE1");
      n_tadd++;
    end
    $display("mechanisms: horizontal=%0d vertical=%0d result-routing=%0d ild=%0d qsf-re=%0d qsf-im=%0d hba+=%0d hba-=%0d ninth-bit=%0d blocked-loads=%0d test-adder=%0d",
             n_horiz, n_vert, n_res, n_ild, n_qsf_re, n_qsf_im, n_plus, n_minus,
             n_wide, n_blocked, n_tadd);
    chk(n_horiz > 0, "horizontal path used");
    chk(n_vert > 0, "vertical path used");
    chk(n_res > 0, "result routing used");
    chk(n_ild > 0, "initial load used");
    chk(n_qsf_re > 0 && n_qsf_im > 0, "QSF both halves used");
    chk(n_plus > 0 && n_minus > 0, "HBA+ and HBA- used");
    chk(n_wide > 0, "ninth accumulator bit needed");
    chk(n_blocked > 0, "load during HBA tried");
    chk(n_tadd > 0, "test adder used");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
