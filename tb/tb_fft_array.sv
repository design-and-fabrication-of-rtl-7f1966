// tb_fft_array: a complete N-point FFT (N = 1024, the transform length the
// PE was sized for) computed by N processing elements, one complex point
// per PE, through log2 N stages of exchange + half-butterfly.
//
// The mesh wiring between PEs is not part of this RTL, so the testbench
// provides the exchange network: in stage q, with D = N/2^q, PE k with
// (k mod 2D) < D ("upper", holds f(k), computes HBA+) sees the partner's
// NO output on its SI input, and PE k+D ("lower", computes HBA-) sees the
// upper PE's SO output on its NI input. Twiddle coefficients enter from the
// west input: W^p with p = bitrev_{q-1}(k / 2D) * D, stored as
// Kr = (Wr+Wi)/2 and Ki = (Wr-Wi)/2 rounded to 8 bits. With data in
// natural order the result appears in bit-reversed order, scaled by 1/N.
//
// Run 1 transforms two complex tones and compares every output with a
// stage-by-stage reference model (bit-exact) and with the exact DFT/N. The
// DFT tolerance is 2 LSB per stage: every right shift truncates towards
// minus infinity, so each stage adds a bias of about one LSB, and the biases
// of successive stages add up, most of all in bin 0. The two tone bins must
// also be the two largest outputs. Run 2 uses random data and is compared bit-exactly. Each HBA
// must take 10 clocks; the total clock count of a transform is printed.
module tb_fft_array;
  import fft_pe_pkg::*;
  import hba_ref_pkg::*;

  localparam int N  = 1024;
  localparam int LG = $clog2(N);
  localparam int T1 = 3, T2 = 200;        // tone bins of run 1

  logic       clk = 0, rst_n = 0;
  logic [7:0] ni [N], si [N], wi [N], so [N], no [N];
  pe_ctrl_t   ci [N];
  logic       busy [N];
  logic [8:0] t_s [N];
  logic [7:0] zero;
  int         span;                        // current shuffling distance D
  int checks = 0, failures = 0;

  // Reference state and twiddles of the current stage.
  logic [7:0] fr [N], fi [N], kr [N], ki [N];

  assign zero = 8'h00;

  for (genvar k = 0; k < N; k++) begin : g_pe
    fft_pe pe (.clk, .rst_n, .ni(ni[k]), .wi(wi[k]), .ei(zero), .si(si[k]),
               .ci(ci[k]), .no(no[k]), .so(so[k]), .busy(busy[k]),
               .t_a(zero), .t_b(zero), .t_ass(1'b0), .t_s(t_s[k]));
  end

  // Exchange network of the current stage.
  always_comb begin
    for (int k = 0; k < N; k++) begin
      ni[k] = '0;
      si[k] = '0;
      if (span > 0) begin
        if ((k % (2 * span)) < span) si[k] = no[k + span];
        else                         ni[k] = so[k - span];
      end
    end
  end

  always #25 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic bit upper(input int k);
    return (k % (2 * span)) < span;
  endfunction

  function automatic int brev(input int x, input int bits);
    int r = 0;
    for (int i = 0; i < bits; i++) r = (r << 1) | ((x >> i) & 1);
    return r;
  endfunction

  function automatic logic [7:0] q8(input real x);
    int v;
    v = $rtoi(x * 128.0 + ((x >= 0.0) ? 0.5 : -0.5));
    if (v > 127) v = 127;
    if (v < -128) v = -128;
    return 8'(v);
  endfunction

  task automatic clear_ci();
    for (int k = 0; k < N; k++) ci[k] = '0;
  endtask

  // One clock; the controls in ci are applied from the falling edge.
  task automatic tick();
    @(posedge clk); #1;
    clear_ci();
    @(negedge clk);
  endtask

  task automatic load_words(input logic [7:0] r [N], input logic [7:0] i [N]);
    for (int k = 0; k < N; k++) begin
      wi[k] = r[k]; ci[k].n_horiz = 1; ci[k].n_ld = 1;
    end
    tick();
    for (int k = 0; k < N; k++) begin
      wi[k] = i[k]; ci[k].n_horiz = 1; ci[k].n_ld = 1; ci[k].ildr = 1;
    end
    tick();
    for (int k = 0; k < N; k++) ci[k].ildi = 1;
    tick();
  endtask

  task automatic load_twiddles();
    for (int k = 0; k < N; k++) begin
      wi[k] = kr[k]; ci[k].n_horiz = 1; ci[k].n_ld = 1;
    end
    tick();
    for (int k = 0; k < N; k++) begin
      wi[k] = ki[k]; ci[k].n_horiz = 1; ci[k].n_ld = 1; ci[k].lkr = 1;
    end
    tick();
    for (int k = 0; k < N; k++) ci[k].lki = 1;
    tick();
  endtask

  task automatic exchange(input bit im);
    for (int k = 0; k < N; k++) begin
      ci[k].qsf = im;
      ci[k].n_res = 1; ci[k].n_ld = 1;
      ci[k].s_res = 1; ci[k].s_ld = 1;
    end
    tick();
    for (int k = 0; k < N; k++)
      if (upper(k)) begin ci[k].s_ld = 1; ci[k].lar = !im; ci[k].lai = im; end
      else          begin ci[k].n_ld = 1; ci[k].lbr = !im; ci[k].lbi = im; end
    tick();
    for (int k = 0; k < N; k++)
      if (upper(k)) begin ci[k].lbr = !im; ci[k].lbi = im; end
      else          begin ci[k].lar = !im; ci[k].lai = im; end
    tick();
  endtask

  task automatic hba();
    int len = 0;
    for (int k = 0; k < N; k++) begin
      ci[k].go = 1; ci[k].op_minus = !upper(k);
    end
    tick();
    while (busy[0] && len < 20) begin
      tick();
      len++;
    end
    checks++;
    if (len != HBA_CYCLES) begin
      failures++;
      $display("FAIL HBA took %0d clocks", len);
    end
  endtask

  // Reference stage on fr/fi.
  task automatic ref_stage();
    logic [7:0] gr [N], gi [N];
    for (int k = 0; k < N; k++) begin
      int j;
      if (upper(k)) begin
        j = k + span;
        gr[k] = hba_ref(fr[k], fr[j], fi[j], kr[k], ki[k], 1'b0, 1'b0);
        gi[k] = hba_ref(fi[k], fr[j], fi[j], kr[k], ki[k], 1'b0, 1'b1);
      end else begin
        j = k - span;
        gr[k] = hba_ref(fr[j], fr[k], fi[k], kr[k], ki[k], 1'b1, 1'b0);
        gi[k] = hba_ref(fi[j], fr[k], fi[k], kr[k], ki[k], 1'b1, 1'b1);
      end
    end
    fr = gr;
    fi = gi;
  endtask

  task automatic run_fft(input bit tone);
    logic [7:0] xr [N], xi [N], orr [N], oi [N];
    real ang, er, ei, tol, mag, mx_other;
    int c0, c1, bad;
    for (int n = 0; n < N; n++) begin
      if (tone) begin
        er = 0.45 * $cos(2.0 * 3.14159265358979 * T1 * n / N)
           + 0.45 * $cos(2.0 * 3.14159265358979 * T2 * n / N);
        ei = 0.45 * $sin(2.0 * 3.14159265358979 * T1 * n / N)
           + 0.45 * $sin(2.0 * 3.14159265358979 * T2 * n / N);
        xr[n] = q8(er); xi[n] = q8(ei);
      end else begin
        xr[n] = 8'($urandom); xi[n] = 8'($urandom);
      end
    end
    fr = xr; fi = xi;
    c0 = 0;
    span = 0;
    load_words(xr, xi);
    for (int q = 1; q <= LG; q++) begin
      span = N >> q;
      for (int k = 0; k < N; k++) begin
        int p = brev(k / (2 * span), q - 1) * span;
        ang = -2.0 * 3.14159265358979 * p / N;
        kr[k] = q8(($cos(ang) + $sin(ang)) / 2.0);
        ki[k] = q8(($cos(ang) - $sin(ang)) / 2.0);
      end
      load_twiddles();
      exchange(1'b0);
      exchange(1'b1);
      hba();
      c0 += 3 + 3 + 3 + 1 + HBA_CYCLES;
      ref_stage();
    end
    // Read out through the N/W DRU onto SO.
    for (int k = 0; k < N; k++) begin ci[k].qsf = 0; ci[k].n_res = 1; ci[k].n_ld = 1; end
    tick();
    for (int k = 0; k < N; k++) orr[k] = so[k];
    for (int k = 0; k < N; k++) begin ci[k].qsf = 1; ci[k].n_res = 1; ci[k].n_ld = 1; end
    tick();
    for (int k = 0; k < N; k++) oi[k] = so[k];
    bad = 0;
    for (int k = 0; k < N; k++) begin
      checks += 2;
      if (orr[k] != fr[k] || oi[k] != fi[k]) begin
        failures++;
        bad++;
        if (bad < 5) $display("FAIL pos %0d got %h,%h ref %h,%h", k, orr[k], oi[k], fr[k], fi[k]);
      end
    end
    if (tone) begin
      c1 = 0;
      tol = 2.0 * LG;
      mx_other = 0.0;
      for (int k = 0; k < N; k++) begin
        int bin = brev(k, LG);
        er = (bin == T1 || bin == T2) ? 0.45 * 128.0 : 0.0;
        checks += 2;
        mag = absr(real'($signed(orr[k]))) + absr(real'($signed(oi[k])));
        if (bin != T1 && bin != T2 && mag > mx_other) mx_other = mag;
        if (absr(real'($signed(orr[k])) - er) > tol || absr(real'($signed(oi[k]))) > tol) begin
          failures++;
          c1++;
          if (c1 < 5) $display("FAIL bin %0d got %0d,%0d exp %f,0", bin,
                               $signed(orr[k]), $signed(oi[k]), er);
        end
      end
      for (int t = 0; t < 2; t++) begin
        int p = brev(t ? T2 : T1, LG);
        checks++;
        if (absr(real'($signed(orr[p]))) + absr(real'($signed(oi[p]))) <= mx_other) begin
          failures++;
          $display("FAIL tone bin %0d not above all others", t ? T2 : T1);
        end
      end
      $display("largest non-tone output |re|+|im| = %0d LSB", $rtoi(mx_other));
      $display("tone bins %0d and %0d: %0d,%0d and %0d,%0d (expected %0d)", T1, T2,
               $signed(orr[brev(T1, LG)]), $signed(oi[brev(T1, LG)]),
               $signed(orr[brev(T2, LG)]), $signed(oi[brev(T2, LG)]), $rtoi(0.45 * 128.0));
    end
    $display("%0d-point FFT: %0d stages, %0d clocks after the initial load (%0d of them HBA)",
             N, LG, c0, LG * HBA_CYCLES);
  endtask

  initial begin
    clear_ci();
    for (int k = 0; k < N; k++) wi[k] = '0;
    span = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    @(negedge clk);
    run_fft(1'b1);
    run_fft(1'b0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
