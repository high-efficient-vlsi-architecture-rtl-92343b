// msp_han_carlson: most significant part, a Han-Carlson parallel-prefix adder
// with a late carry input.
//
// Its W positions take bit-level (G, P) and the carry LC from the least
// significant part, and produce the upper sum bits and Cout. The prefix tree
// works on local positions 0..W-1 only, so it runs in parallel with the least
// significant part; LC is merged at the end:
//   level 1         odd positions i take (G,P)_i o (G,P)_{i-1}
//   levels 2..      Kogge-Stone on odd positions only, span 2, 4, 8, ...
//                   (position i combines with i-span while i-span >= 0)
//   last level      each even position i >= 2 takes (G,P)_i o (G,P)_{i-1:0}
// giving the group terms (G, P)_{i:0} for every i with 1 + ceil(log2 W)
// prefix levels and at most two cells driven by one node in any level.
// Carries and sums:
//   c_i = G_{i:0} | P_{i:0} & lc     sum[i] = P_i ^ c_{i-1}, c_{-1} = lc
//   cout = c_{W-1}.
// Choosing Han-Carlson for this part follows the design; the tree's exact
// wiring and the late merge of LC are the standard form of that adder and
// this implementation's choice. Purely combinational.
module msp_han_carlson
  import three_op_pkg::*;
#(
  parameter int unsigned W = three_op_pkg::OP_WIDTH_DEFAULT
                             - three_op_pkg::LSP_WIDTH_DEFAULT + 1
) (
  input  logic [W-1:0] g,     // G of the upper positions
  input  logic [W-1:0] p,     // P of the upper positions
  input  logic         lc,    // carry from the least significant part
  output logic [W-1:0] sum,   // Sum MSP
  output logic         cout   // carry out of the top position
);

  gp_t [W-1:0] grp;  // (G, P)_{i:0} after the prefix tree
  logic [W-1:0] c;   // carry out of each position

  always_comb begin
    gp_t [W-1:0] cur;
    gp_t [W-1:0] nxt;
    for (int i = 0; i < W; i++) begin
      cur[i].g = g[i];
      cur[i].p = p[i];
    end
    // Level 1: odd positions absorb their even neighbour.
    nxt = cur;
    for (int i = 1; i < W; i += 2) begin
      nxt[i] = gp_combine(cur[i], cur[i-1]);
    end
    cur = nxt;
    // Kogge-Stone levels on the odd positions.
    for (int span = 2; span < W; span *= 2) begin
      nxt = cur;
      for (int i = 1; i < W; i += 2) begin
        if (i >= span) begin
          nxt[i] = gp_combine(cur[i], cur[i-span]);
        end
      end
      cur = nxt;
    end
    // Last level: even positions take the finished prefix below them.
    nxt = cur;
    for (int i = 2; i < W; i += 2) begin
      nxt[i] = gp_combine(cur[i], cur[i-1]);
    end
    grp = nxt;
  end

  always_comb begin
    for (int i = 0; i < W; i++) begin
      c[i] = grp[i].g | (grp[i].p & lc);
    end
    sum[0] = p[0] ^ lc;
    for (int i = 1; i < W; i++) begin
      sum[i] = p[i] ^ c[i-1];
    end
  end

  assign cout = c[W-1];

endmodule
