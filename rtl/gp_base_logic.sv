// gp_base_logic: bit-level generate and propagate of the two-operand sum.
//
// After the full-adder array the remaining addition is S' + 2*cy. At bit
// position i the two addends are S'_i and cy_{i-1} (the full-adder carry of
// the position below), so
//   G_i = S'_i & cy_{i-1}        P_i = S'_i ^ cy_{i-1}
// as in the design's equations. The caller supplies cy_{i-1} already aligned
// in cy_dn (cy_dn[i] = cy_{i-1}); for the lowest position of the whole adder
// it supplies 0 and the carry input enters the least significant part as
// c(-1) instead. Because P is an XOR and G an AND of the same two bits, G_i
// and P_i are never both 1, a property the least significant part relies on.
// Purely combinational, one gate delay.
module gp_base_logic #(
  parameter int unsigned W = three_op_pkg::OP_WIDTH_DEFAULT
) (
  input  logic [W-1:0] s_p,    // S' bits of these positions
  input  logic [W-1:0] cy_dn,  // cy_{i-1} for each position i
  output logic [W-1:0] g,      // G_i
  output logic [W-1:0] p       // P_i
);

  assign g = s_p & cy_dn;
  assign p = s_p ^ cy_dn;

endmodule
