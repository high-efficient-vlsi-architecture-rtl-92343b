// three_op_pkg: types, defaults and the prefix operator shared by the
// three-operand adder.
//
// The adder reduces A + B + C + Cin to a two-operand problem (S' + 2*cy) and
// then resolves the carries of that problem with generate/propagate logic.
// gp_t is the (generate, propagate) pair of one bit or of a group of bits;
// gp_combine is the usual associative prefix operator ("black cell"):
//   (G, P)hi o (G, P)lo = (Ghi | Phi & Glo, Phi & Plo).
// The default operand width of 8 bits is the operand width of the published
// simulation of the reference adder this design is compared with. The split
// between the least significant part (4 low positions) and the most
// significant part (the other 5 of the 9 result positions) is this design's
// own choice.
package three_op_pkg;

  // Operand width (bits of A, B and C).
  localparam int unsigned OP_WIDTH_DEFAULT  = 8;
  // Number of low bit positions handled by the least significant part.
  localparam int unsigned LSP_WIDTH_DEFAULT = 4;

  typedef struct packed {
    logic g;  // group generates a carry
    logic p;  // group propagates an incoming carry
  } gp_t;

  // Prefix operator: hi is the more significant group, lo the adjacent
  // less significant group.
  function automatic gp_t gp_combine(gp_t hi, gp_t lo);
    gp_t r;
    r.g = hi.g | (hi.p & lo.g);
    r.p = hi.p & lo.p;
    return r;
  endfunction

endpackage
