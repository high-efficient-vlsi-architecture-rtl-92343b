// tb_msp_han_carlson: self-checking test of the most significant part.
//
// The default 5-position instance (the upper part of the 8-bit adder) is
// tested exhaustively: all 2^11 combinations of addends x, y and carry input
// lc, with (G, P) = (x & y, x ^ y) and {cout, sum} compared with x + y + lc.
// Further widths 1, 2, 3, 8, 16, 17 and 33 exercise every shape of the
// prefix tree (odd/even top position, several Kogge-Stone levels) with
// random and corner-case operands. A watchdog ends a hung run with a failure.
module tb_msp_han_carlson;

  localparam int unsigned W = three_op_pkg::OP_WIDTH_DEFAULT
                              - three_op_pkg::LSP_WIDTH_DEFAULT + 1;
  localparam int NSLICE = 7;

  logic [W-1:0] x, y, sum;
  logic         lc, cout;
  int checks = 0;
  int failures = 0;
  int s_checks [NSLICE];
  int s_fail   [NSLICE];
  bit s_done   [NSLICE];

  msp_han_carlson dut (.g(x & y), .p(x ^ y), .lc(lc), .sum(sum), .cout(cout));

  tb_msp_han_carlson_slice #(.W(1))  s1  (.checks(s_checks[0]), .failures(s_fail[0]), .done(s_done[0]));
  tb_msp_han_carlson_slice #(.W(2))  s2  (.checks(s_checks[1]), .failures(s_fail[1]), .done(s_done[1]));
  tb_msp_han_carlson_slice #(.W(3))  s3  (.checks(s_checks[2]), .failures(s_fail[2]), .done(s_done[2]));
  tb_msp_han_carlson_slice #(.W(8))  s8  (.checks(s_checks[3]), .failures(s_fail[3]), .done(s_done[3]));
  tb_msp_han_carlson_slice #(.W(16)) s16 (.checks(s_checks[4]), .failures(s_fail[4]), .done(s_done[4]));
  tb_msp_han_carlson_slice #(.W(17)) s17 (.checks(s_checks[5]), .failures(s_fail[5]), .done(s_done[5]));
  tb_msp_han_carlson_slice #(.W(33)) s33 (.checks(s_checks[6]), .failures(s_fail[6]), .done(s_done[6]));

  initial begin
    for (int v = 0; v < (1 << (2 * W + 1)); v++) begin
      {x, y, lc} = (2 * W + 1)'(v);
      #1;
      checks++;
      if ({cout, sum} != (W + 1)'(int'(x) + int'(y) + int'(lc))) begin
        failures++;
        if (failures < 10) $display("FAIL W=%0d: x=%0d y=%0d lc=%b -> %0d", W, x, y, lc, {cout, sum});
      end
    end
    for (int s = 0; s < NSLICE; s++) wait (s_done[s]);
    for (int s = 0; s < NSLICE; s++) begin
      checks += s_checks[s];
      failures += s_fail[s];
    end
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
