// tb_msp_han_carlson_slice: checker for one width of the Han-Carlson part.
//
// Instantiates msp_han_carlson with W positions, drives NRAND random addend
// pairs x, y and carry inputs lc (plus all-zero, all-one and all-propagate
// corners), and compares {cout, sum} with the arithmetic x + y + lc computed
// on a W+1-bit vector. Reports its counts through checks and failures once
// done is set. Used by tb_msp_han_carlson.
module tb_msp_han_carlson_slice #(
  parameter int unsigned W     = 5,
  parameter int unsigned NRAND = 2000
) (
  output int checks,
  output int failures,
  output bit done
);

  logic [W-1:0] x, y, sum;
  logic         lc, cout;
  logic [W:0]   expected;

  msp_han_carlson #(.W(W)) dut (.g(x & y), .p(x ^ y), .lc(lc), .sum(sum), .cout(cout));

  task automatic check_one();
    #1;
    expected = {1'b0, x} + {1'b0, y} + {{W{1'b0}}, lc};
    checks++;
    if ({cout, sum} != expected) begin
      failures++;
      if (failures < 10)
        $display("FAIL W=%0d: x=%h y=%h lc=%b -> %h, expected %h", W, x, y, lc, {cout, sum}, expected);
    end
  endtask

  initial begin
    checks = 0;
    failures = 0;
    done = 0;
    for (int k = 0; k < 2; k++) begin
      lc = k[0];
      x = '0; y = '0; check_one();
      x = '1; y = '1; check_one();
      x = '1; y = '0; check_one();   // carry must ripple through every position
      for (int i = 0; i < W; i++) begin
        x = '1; y = '0; x[i] = 1'b0; check_one();
        x = '0; y = '0; x[i] = 1'b1; y[i] = 1'b1; check_one();
      end
    end
    for (int k = 0; k < NRAND; k++) begin
      for (int j = 0; j < W; j++) begin
        x[j] = 1'($urandom_range(1));
        y[j] = 1'($urandom_range(1));
      end
      lc = 1'($urandom_range(1));
      check_one();
    end
    done = 1;
  end
endmodule
