// tb_bit_addition_logic: self-checking test of the full-adder array.
//
// Drives random and corner-case operand triples into an 8-bit and a 1-bit
// instance and checks, for every bit, that 2*cy[i] + s_p[i] equals the
// arithmetic sum a[i] + b[i] + c[i], and for the whole word that
// s_p + 2*cy = a + b + c. A watchdog ends the run with a failure if it hangs.
module tb_bit_addition_logic;

  localparam int unsigned N = 8;

  logic [N-1:0] a, b, c, s_p, cy;
  logic         a1, b1, c1, s1, cy1;
  int checks = 0;
  int failures = 0;

  bit_addition_logic #(.N(N)) dut   (.a(a), .b(b), .c(c), .s_p(s_p), .cy(cy));
  bit_addition_logic #(.N(1)) dut_1 (.a(a1), .b(b1), .c(c1), .s_p(s1), .cy(cy1));

  task automatic check_word();
    int unsigned bitsum;
    int unsigned ref_total;
    int unsigned got_total;
    #1;
    for (int i = 0; i < N; i++) begin
      bitsum = int'(a[i]) + int'(b[i]) + int'(c[i]);
      checks++;
      if ({cy[i], s_p[i]} != 2'(bitsum)) begin
        failures++;
        $display("FAIL bit %0d: a=%h b=%h c=%h s_p=%h cy=%h", i, a, b, c, s_p, cy);
      end
    end
    ref_total = int'(a) + int'(b) + int'(c);
    got_total = int'(s_p) + 2 * int'(cy);
    checks++;
    if (got_total != ref_total) begin
      failures++;
      $display("FAIL word: a=%0d b=%0d c=%0d -> %0d, expected %0d", a, b, c, got_total, ref_total);
    end
  endtask

  initial begin
    // All eight single-bit combinations on the 1-bit instance.
    for (int v = 0; v < 8; v++) begin
      {a1, b1, c1} = 3'(v);
      #1;
      checks++;
      if ({cy1, s1} != 2'(int'(a1) + int'(b1) + int'(c1))) begin
        failures++;
        $display("FAIL 1-bit: %b%b%b -> cy=%b s=%b", a1, b1, c1, cy1, s1);
      end
    end
    // Corners.
    a = '0; b = '0; c = '0; check_word();
    a = '1; b = '1; c = '1; check_word();
    a = '1; b = '0; c = '1; check_word();
    a = 8'hAA; b = 8'h55; c = 8'hFF; check_word();
    // Random.
    for (int k = 0; k < 20000; k++) begin
      a = N'($urandom); b = N'($urandom); c = N'($urandom);
      check_word();
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
