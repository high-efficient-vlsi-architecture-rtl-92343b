// bit_addition_logic: first stage of the three-operand adder.
//
// An array of N independent full adders (carry-save compression, no carry
// chain). Full adder i adds the bits a[i], b[i], c[i] of the three operands:
//   s_p[i] = a[i] ^ b[i] ^ c[i]                        (S'_i)
//   cy[i]  = a[i]&b[i] | b[i]&c[i] | c[i]&a[i]         (cy_i, weight 2^(i+1))
// so that A + B + C = S' + 2*cy. The equations are those of the design; the
// module is purely combinational with one full-adder delay from any input to
// any output.
module bit_addition_logic #(
  parameter int unsigned N = three_op_pkg::OP_WIDTH_DEFAULT
) (
  input  logic [N-1:0] a,
  input  logic [N-1:0] b,
  input  logic [N-1:0] c,
  output logic [N-1:0] s_p,  // bitwise sum S'
  output logic [N-1:0] cy    // bitwise carry cy, cy[i] has weight 2^(i+1)
);

  always_comb begin
    for (int i = 0; i < N; i++) begin
      s_p[i] = a[i] ^ b[i] ^ c[i];
      cy[i]  = (a[i] & b[i]) | (b[i] & c[i]) | (c[i] & a[i]);
    end
  end

endmodule
