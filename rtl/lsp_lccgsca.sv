// lsp_lccgsca: least significant part, a low-cost carry generation and
// selection carry adder (LCCGSCA).
//
// From the bit-level (G, P) of its L positions and the adder's carry input
// cin it produces the L low sum bits and the carry LC into the most
// significant part. It works in two steps, following the design's equations:
//   carry generation: c0(i) = G(i) | P(i) & c0(i-1), c0(-1) = 0, i.e. the
//     carries assuming a carry input of 0, together with the group
//     propagate PP(i) = P(0) & ... & P(i);
//   carry selection: c(i) = c0(i) | cin & PP(i). Since G and P of a bit are
//     never both 1, c0(i) is 0 whenever PP(i) is 1, so this is a single
//     2:1 multiplexer per bit, c(i) = PP(i) ? cin : c0(i) -- the low-cost
//     selection the design uses instead of an AND-OR.
// Sum bits: sum[i] = P(i) ^ c(i-1) with c(-1) = cin. LC = c(L-1).
// The generation chain is a ripple, independent of cin, so cin reaches the
// outputs through only one multiplexer and one XOR. Purely combinational.
// An assertion flags (G, P) inputs that violate the exclusivity it relies on.
module lsp_lccgsca #(
  parameter int unsigned L = three_op_pkg::LSP_WIDTH_DEFAULT
) (
  input  logic [L-1:0] g,    // G(i) of the low positions
  input  logic [L-1:0] p,    // P(i) of the low positions
  input  logic         cin,  // carry input of the adder, c(-1)
  output logic [L-1:0] sum,  // Sum LSP
  output logic         lc    // carry into the most significant part, c(L-1)
);

  logic [L-1:0] c0;  // carries for a carry input of 0
  logic [L-1:0] pp;  // group propagate P(0..i)
  logic [L-1:0] c;   // selected carries

  // Carry generation (independent of cin).
  always_comb begin
    logic c0_run;
    logic pp_run;
    c0_run = 1'b0;
    pp_run = 1'b1;
    for (int i = 0; i < L; i++) begin
      c0_run = g[i] | (p[i] & c0_run);
      pp_run = p[i] & pp_run;
      c0[i]  = c0_run;
      pp[i]  = pp_run;
    end
  end

  // The selection below is exact only for (G, P) pairs from the base logic,
  // where a position never both generates and propagates.
  always_comb begin
    assert (!(|(g & p)))
      else $error("lsp_lccgsca: G and P both set at one position (g=%b p=%b)", g, p);
  end

  // Carry selection: one 2:1 multiplexer per bit.
  always_comb begin
    for (int i = 0; i < L; i++) begin
      c[i] = pp[i] ? cin : c0[i];
    end
  end

  // Sum bits: P(i) xor the carry into position i.
  always_comb begin
    sum[0] = p[0] ^ cin;
    for (int i = 1; i < L; i++) begin
      sum[i] = p[i] ^ c[i-1];
    end
  end

  assign lc = c[L-1];

endmodule
