// tb_lsp_lccgsca: self-checking test of the least significant part.
//
// The (G, P) inputs are derived from two addends x and y (G = x & y,
// P = x ^ y), exactly the form the adder's base logic produces. The expected
// {lc, sum} is the arithmetic x + y + cin. The 4-bit default instance is
// tested exhaustively (512 cases), a 1-bit and a 7-bit instance exhaustively
// as well. Counts how often LC is produced by the carry-selection path
// (all positions propagate, cin = 1) and by the generation path, and fails
// if either never occurs. A watchdog ends a hung run with a failure.
module tb_lsp_lccgsca;

  localparam int unsigned L  = three_op_pkg::LSP_WIDTH_DEFAULT;
  localparam int unsigned L7 = 7;

  logic [L-1:0]  x, y, sum;
  logic          cin, lc;
  logic [L7-1:0] x7, y7, sum7;
  logic          lc7;
  logic          x1, y1, sum1, lc1;
  int checks = 0;
  int failures = 0;
  int sel_count = 0;
  int gen_count = 0;

  lsp_lccgsca dut (.g(x & y), .p(x ^ y), .cin(cin), .sum(sum), .lc(lc));
  lsp_lccgsca #(.L(L7)) dut7 (.g(x7 & y7), .p(x7 ^ y7), .cin(cin), .sum(sum7), .lc(lc7));
  lsp_lccgsca #(.L(1))  dut1 (.g(x1 & y1), .p(x1 ^ y1), .cin(cin), .sum(sum1), .lc(lc1));

  initial begin
    for (int v = 0; v < (1 << (2 * L + 1)); v++) begin
      {x, y, cin} = (2 * L + 1)'(v);
      #1;
      checks++;
      if ({lc, sum} != (L + 1)'(int'(x) + int'(y) + int'(cin))) begin
        failures++;
        $display("FAIL L=%0d: x=%0d y=%0d cin=%b -> %0d", L, x, y, cin, {lc, sum});
      end
      if (lc && &(x ^ y)) sel_count++;
      if (lc && !(&(x ^ y))) gen_count++;
    end
    for (int v = 0; v < (1 << (2 * L7 + 1)); v++) begin
      {x7, y7, cin} = (2 * L7 + 1)'(v);
      #1;
      checks++;
      if ({lc7, sum7} != (L7 + 1)'(int'(x7) + int'(y7) + int'(cin))) begin
        failures++;
        if (failures < 10) $display("FAIL L=7: x=%0d y=%0d cin=%b -> %0d", x7, y7, cin, {lc7, sum7});
      end
    end
    for (int v = 0; v < 8; v++) begin
      {x1, y1, cin} = 3'(v);
      #1;
      checks++;
      if ({lc1, sum1} != 2'(int'(x1) + int'(y1) + int'(cin))) begin
        failures++;
        $display("FAIL L=1: x=%b y=%b cin=%b -> %b%b", x1, y1, cin, lc1, sum1);
      end
    end
    $display("LC by selection of cin: %0d, LC generated: %0d", sel_count, gen_count);
    checks++;
    if (sel_count == 0 || gen_count == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #10_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
