// tb_three_op_adder: end-to-end test of the three-operand adder.
//
// The main instance has every parameter at its default (8-bit operands,
// 4-bit least significant part). It first applies the vector of the
// published 8-bit simulation (10 + 20 + 30, cin = 0, result 60), then
// corner cases and then every one of the 2^(3N+1) combinations of a, b,
// c and cin; each result {cout, sum} is compared with a + b + c + cin computed in
// integer arithmetic. The datapath is combinational, so each vector is
// checked 1 ns after it is applied.
// It counts how often each mechanism of the datapath is exercised and fails
// if one never is:
//   - LC produced by carry selection (all low positions propagate, the
//     multiplexers pass cin),
//   - LC produced by the carry-generation chain,
//   - a carry out of the full width (cout = 1) and result bit N set.
// Further instances check other widths and split points: N = 16, 32, 64
// with L = N/2, N = 13 with L = 5, and N = 8 with L = 1 and L = 8.
// A watchdog ends a hung run with a failure.
module tb_three_op_adder;

  localparam int unsigned N = three_op_pkg::OP_WIDTH_DEFAULT;
  localparam int unsigned L = three_op_pkg::LSP_WIDTH_DEFAULT;
  localparam int NSLICE = 6;

  logic [N-1:0] a, b, c;
  logic         cin, cout;
  logic [N:0]   sum;
  int checks = 0;
  int failures = 0;
  int n_lc_select = 0;
  int n_lc_generate = 0;
  int n_cout = 0;
  int n_top_sum = 0;
  int s_checks [NSLICE];
  int s_fail   [NSLICE];
  bit s_done   [NSLICE];

  three_op_adder dut (.a(a), .b(b), .c(c), .cin(cin), .sum(sum), .cout(cout));

  tb_three_op_adder_slice #(.N(16), .L(8))  s16 (.checks(s_checks[0]), .failures(s_fail[0]), .done(s_done[0]));
  tb_three_op_adder_slice #(.N(32), .L(16)) s32 (.checks(s_checks[1]), .failures(s_fail[1]), .done(s_done[1]));
  tb_three_op_adder_slice #(.N(64), .L(32)) s64 (.checks(s_checks[2]), .failures(s_fail[2]), .done(s_done[2]));
  tb_three_op_adder_slice #(.N(13), .L(5))  s13 (.checks(s_checks[3]), .failures(s_fail[3]), .done(s_done[3]));
  tb_three_op_adder_slice #(.N(8),  .L(1))  s8a (.checks(s_checks[4]), .failures(s_fail[4]), .done(s_done[4]));
  tb_three_op_adder_slice #(.N(8),  .L(8))  s8b (.checks(s_checks[5]), .failures(s_fail[5]), .done(s_done[5]));

  // Independent model: plain integer addition.
  task automatic apply(input logic [N-1:0] va, vb, vc, input logic vcin);
    int unsigned expected;
    a = va; b = vb; c = vc; cin = vcin;
    #1;
    expected = int'(va) + int'(vb) + int'(vc) + int'(vcin);
    checks++;
    if ({cout, sum} != (N + 2)'(expected)) begin
      failures++;
      if (failures < 10)
        $display("FAIL: %0d + %0d + %0d + %0d -> %0d, expected %0d",
                 va, vb, vc, vcin, {cout, sum}, expected);
    end
    // Mechanism coverage, observed on the internal carry LC.
    if (dut.lc && dut.u_lsp.pp[L-1]) n_lc_select++;
    if (dut.lc && !dut.u_lsp.pp[L-1]) n_lc_generate++;
    if (cout) n_cout++;
    if (sum[N]) n_top_sum++;
  endtask

  initial begin
    // Vector of the published simulation.
    apply(8'd10, 8'd20, 8'd30, 1'b0);
    checks++;
    if (sum != 9'd60 || cout) begin
      failures++;
      $display("FAIL: 10 + 20 + 30 gave %0d", {cout, sum});
    end
    // Corners.
    apply('0, '0, '0, 1'b0);
    apply('1, '1, '1, 1'b1);       // largest result, 3*(2^N-1)+1
    apply(N'(1), '0, '0, 1'b1);
    apply(N'(2 ** L - 1), '0, '0, 1'b1);  // cin selected through all low positions
    // Every input combination of the default-size adder.
    for (longint v = 0; v < (longint'(1) << (3 * N + 1)); v++) begin
      apply(N'(v >> (2 * N + 1)), N'(v >> (N + 1)), N'(v >> 1), v[0]);
    end
    $display("mechanisms: LC by selection=%0d LC by generation=%0d cout=%0d sum[N]=%0d",
             n_lc_select, n_lc_generate, n_cout, n_top_sum);
    checks += 4;
    if (n_lc_select == 0) failures++;
    if (n_lc_generate == 0) failures++;
    if (n_cout == 0) failures++;
    if (n_top_sum == 0) failures++;
    for (int s = 0; s < NSLICE; s++) wait (s_done[s]);
    for (int s = 0; s < NSLICE; s++) begin
      checks += s_checks[s];
      failures += s_fail[s];
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1_000_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
