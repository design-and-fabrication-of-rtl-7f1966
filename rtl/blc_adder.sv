// blc_adder: W-bit binary lookahead carry (BLC) adder.
//
// Sum s = a + b + cin with carry out cout, used twice in the HBAU and once
// more as a stand-alone test cell on the chip (inputs A7..A0, B7..B0, ASS,
// outputs S8..S0). The carries come from a Brent-Kung prefix tree: cells
// GP form bit generate/propagate, an up-sweep of black cells combines them
// in groups of 2, 4, 8 ... and a down-sweep fills in the remaining
// positions, so the carry depth grows with 2*log2(W). The carry input is
// merged into bit 0 (the BC cell of the layout) and the SG cells form the
// sums. The document gives the cell rows of the 8-bit layout; the exact
// tree below is the textbook Brent-Kung form, a choice of this design.
// Purely combinational; W must be a power of two.
module blc_adder #(
  parameter int unsigned W = 8
) (
  input  logic [W-1:0] a,
  input  logic [W-1:0] b,
  input  logic         cin,
  output logic [W-1:0] s,
  output logic         cout
);
  localparam int unsigned L = $clog2(W);

  logic [W-1:0] p0;
  // Group generate/propagate after each level of the tree.
  logic [W-1:0] g [0:2*L];
  logic [W-1:0] p [0:2*L];

  always_comb begin
    p0   = a ^ b;
    g[0] = a & b;
    p[0] = p0;
    // BC cell: the carry input is absorbed into bit 0.
    g[0][0] = (a[0] & b[0]) | (p0[0] & cin);
    // Up-sweep: at level l, bit i with (i+1) a multiple of 2^(l+1) takes
    // the group ending at i - 2^l.
    for (int l = 0; l < int'(L); l++) begin
      g[l+1] = g[l];
      p[l+1] = p[l];
      for (int i = 0; i < int'(W); i++) begin
        if (((i + 1) % (1 << (l + 1))) == 0) begin
          g[l+1][i] = g[l][i] | (p[l][i] & g[l][i-(1<<l)]);
          p[l+1][i] = p[l][i] & p[l][i-(1<<l)];
        end
      end
    end
    // Down-sweep: fill in the carries at the remaining positions.
    for (int l = int'(L) - 2; l >= 0; l--) begin
      g[2*L-1-l] = g[2*L-2-l];
      p[2*L-1-l] = p[2*L-2-l];
      for (int i = 0; i < int'(W); i++) begin
        if (((i + 1) % (1 << (l + 1))) == (1 << l) && i >= (1 << (l + 1))) begin
          g[2*L-1-l][i] = g[2*L-2-l][i] | (p[2*L-2-l][i] & g[2*L-2-l][i-(1<<l)]);
          p[2*L-1-l][i] = p[2*L-2-l][i] & p[2*L-2-l][i-(1<<l)];
        end
      end
    end
    g[2*L] = g[2*L-1];
    p[2*L] = p[2*L-1];
    // SG cells: sum bit i uses the carry into bit i.
    s[0] = p0[0] ^ cin;
    for (int i = 1; i < int'(W); i++) s[i] = p0[i] ^ g[2*L][i-1];
    cout = g[2*L][W-1];
  end
endmodule
