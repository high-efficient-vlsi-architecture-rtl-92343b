// three_op_adder: high-speed, area-efficient three-operand binary adder.
//
// Computes {cout, sum} = a + b + c + cin for three N-bit operands; the
// (N+2)-bit result is exact for all inputs. The datapath has three parts:
//   1. bit_addition_logic: N full adders compress a, b, c into S' and cy
//      (a + b + c = S' + 2*cy) in one full-adder delay.
//   2. gp_base_logic: bit-level G_i = S'_i & cy_{i-1}, P_i = S'_i ^ cy_{i-1}
//      for positions 0..N. Position N has no operand bits (S'_N = 0) and only
//      receives cy_{N-1}, so G_N = 0 and P_N = cy_{N-1}. Position 0 receives
//      no full-adder carry; cin enters as the carry input of part 3.
//   3. Carry resolution split at position L:
//        lsp_lccgsca      positions 0..L-1, low-cost carry generation and
//                         selection, outputs Sum LSP and the carry LC;
//        msp_han_carlson  positions L..N, Han-Carlson prefix tree, takes LC
//                         late and outputs Sum MSP and Cout.
// sum = {Sum MSP, Sum LSP} holds bits 0..N of the result, cout is bit N+1.
// The three stages, the G/P equations and the choice of adder for each part
// follow the design; the split point L (default N/2), the (N+2)-bit output
// and the way cin is brought in are this implementation's choices. There is
// no clock: the whole adder is combinational.
module three_op_adder
  import three_op_pkg::*;
#(
  parameter int unsigned N = OP_WIDTH_DEFAULT,   // operand width
  parameter int unsigned L = LSP_WIDTH_DEFAULT   // width of the least significant part
) (
  input  logic [N-1:0] a,
  input  logic [N-1:0] b,
  input  logic [N-1:0] c,
  input  logic         cin,
  output logic [N:0]   sum,   // result bits 0..N
  output logic         cout   // result bit N+1
);

  localparam int unsigned W = N + 1 - L;  // positions of the most significant part

  if (L < 1 || L > N) begin : g_bad_split
    $error("three_op_adder: L must lie in 1..N");
  end

  logic [N-1:0] s_p;    // S'
  logic [N-1:0] cy;     // full-adder carries
  logic [N:0]   s_ext;  // S' extended by position N
  logic [N:0]   cy_dn;  // cy_{i-1} at each position
  logic [N:0]   g;
  logic [N:0]   p;
  logic         lc;     // carry from the least significant part

  bit_addition_logic #(.N(N)) u_bal (
    .a   (a),
    .b   (b),
    .c   (c),
    .s_p (s_p),
    .cy  (cy)
  );

  assign s_ext = {1'b0, s_p};
  assign cy_dn = {cy, 1'b0};

  gp_base_logic #(.W(N + 1)) u_gp (
    .s_p   (s_ext),
    .cy_dn (cy_dn),
    .g     (g),
    .p     (p)
  );

  lsp_lccgsca #(.L(L)) u_lsp (
    .g   (g[L-1:0]),
    .p   (p[L-1:0]),
    .cin (cin),
    .sum (sum[L-1:0]),
    .lc  (lc)
  );

  msp_han_carlson #(.W(W)) u_msp (
    .g    (g[N:L]),
    .p    (p[N:L]),
    .lc   (lc),
    .sum  (sum[N:L]),
    .cout (cout)
  );

endmodule
