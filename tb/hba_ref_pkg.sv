// hba_ref_pkg: reference models for the PE testbenches.
//
// hba_ref computes the half-butterfly the way the PE defines it, step by
// step from the coefficient table (Q = +-Kr or +-Ki chosen by the bit pair
// of B, sign reversed on the sign bit), in plain integer arithmetic:
//   t = Q(n=7) + c,  t = floor(t/2) + Q(n)  for n = 6..0,  r = t + A/2
// where A/2 and B/2 are the operands shifted right one bit and c is the
// constant term (-K-1 as the ones' complement for HBA+, +K for HBA-).
// hba_ideal gives the exact value A/2 & B/2*W in LSB units, with
// Wr = Kr + Ki and Wi = Kr - Ki, for a tolerance check.
package hba_ref_pkg;

  function automatic int sx8(input logic [7:0] v);
    return int'($signed(v));
  endfunction

  function automatic int wrap(input int v, input int bits);
    int m;
    m = v & ((1 << bits) - 1);
    if (m >= (1 << (bits - 1))) m -= (1 << bits);
    return m;
  endfunction

  // Coefficient for one bit pair, Table I, n != 0 column.
  function automatic int tab_q(input bit rb, input bit ib, input int kr,
                               input int ki, input bit imag);
    case ({rb, ib})
      2'b00: return imag ? -kr : -ki;
      2'b01: return imag ?  ki : -kr;
      2'b10: return imag ? -ki :  kr;
      default: return imag ? kr : ki;
    endcase
  endfunction

  // Set by hba_ref when an intermediate sum needed the ninth bit.
  bit last_wide;

  function automatic logic [7:0] hba_ref(
      input logic [7:0] a, input logic [7:0] br, input logic [7:0] bi,
      input logic [7:0] kr, input logic [7:0] ki, input bit op_minus,
      input bit imag);
    logic [7:0] bs_r, bs_i;
    int t, q, c, k;
    last_wide = 1'b0;
    bs_r = {br[7], br[7:1]};
    bs_i = {bi[7], bi[7:1]};
    k = imag ? sx8(kr) : sx8(ki);
    c = op_minus ? k : (-k - 1);
    t = 0;
    for (int j = 0; j < 8; j++) begin
      q = tab_q(bs_r[j], bs_i[j], sx8(kr), sx8(ki), imag);
      if (j == 7) q = -q;            // sign bit n = 0
      if (op_minus) q = -q;
      if (j == 0) t = wrap(q + c, 9);
      else        t = wrap((t >>> 1) + q, 9);
      if (j < 7 && (t < -128 || t > 127)) last_wide = 1'b1;
    end
    return 8'(wrap(wrap(t, 8) + (sx8(a) >>> 1), 8));
  endfunction

  function automatic real absr(input real x);
    return (x < 0.0) ? -x : x;
  endfunction

  function automatic real hba_ideal(
      input logic [7:0] a, input logic [7:0] br, input logic [7:0] bi,
      input logic [7:0] kr, input logic [7:0] ki, input bit op_minus,
      input bit imag);
    real wr, wi, rr, ri, p;
    wr = real'(sx8(kr) + sx8(ki)) / 128.0;
    wi = real'(sx8(kr) - sx8(ki)) / 128.0;
    rr = real'(sx8(br)) / 2.0;
    ri = real'(sx8(bi)) / 2.0;
    p  = imag ? (rr * wi + ri * wr) : (rr * wr - ri * wi);
    return real'(sx8(a)) / 2.0 + (op_minus ? -p : p);
  endfunction

endpackage
