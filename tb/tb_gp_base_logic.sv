// tb_gp_base_logic: self-checking test of the bit-level generate/propagate
// logic.
//
// Exhaustively drives all 2^18 input pairs of a 9-position instance. For each
// position the expected values come from the arithmetic sum of the two bits:
// G is 1 when the sum is 2, P when it is 1. Also checks that G and P are
// never 1 together. A watchdog ends the run with a failure if it hangs.
module tb_gp_base_logic;

  localparam int unsigned W = 9;

  logic [W-1:0] s_p, cy_dn, g, p;
  int checks = 0;
  int failures = 0;

  gp_base_logic #(.W(W)) dut (.s_p(s_p), .cy_dn(cy_dn), .g(g), .p(p));

  initial begin
    for (int v = 0; v < (1 << (2 * W)); v++) begin
      {s_p, cy_dn} = (2 * W)'(v);
      #1;
      for (int i = 0; i < W; i++) begin
        int unsigned bsum;
        bsum = int'(s_p[i]) + int'(cy_dn[i]);
        checks++;
        if (g[i] != (bsum == 2) || p[i] != (bsum == 1) || (g[i] && p[i])) begin
          failures++;
          if (failures < 10)
            $display("FAIL pos %0d: s=%b y=%b -> g=%b p=%b", i, s_p[i], cy_dn[i], g[i], p[i]);
        end
      end
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
