// tb_three_op_adder_slice: checker for one (N, L) configuration of the
// three-operand adder.
//
// Drives corner cases (all zero, all one, one operand all one, single set
// bits) and NRAND random operand triples with random carry input, and
// compares the (N+2)-bit result {cout, sum} with a + b + c + cin computed
// on an N+2-bit vector. Reports through checks and failures once done is
// set. Used by tb_three_op_adder.
module tb_three_op_adder_slice #(
  parameter int unsigned N     = 16,
  parameter int unsigned L     = 8,
  parameter int unsigned NRAND = 2000
) (
  output int checks,
  output int failures,
  output bit done
);

  logic [N-1:0] a, b, c;
  logic         cin, cout;
  logic [N:0]   sum;
  logic [N+1:0] expected;

  three_op_adder #(.N(N), .L(L)) dut (.a(a), .b(b), .c(c), .cin(cin), .sum(sum), .cout(cout));

  task automatic check_one();
    #1;
    expected = {2'b0, a} + {2'b0, b} + {2'b0, c} + {{(N + 1){1'b0}}, cin};
    checks++;
    if ({cout, sum} != expected) begin
      failures++;
      if (failures < 10)
        $display("FAIL N=%0d L=%0d: a=%h b=%h c=%h cin=%b -> %h, expected %h",
                 N, L, a, b, c, cin, {cout, sum}, expected);
    end
  endtask

  initial begin
    checks = 0;
    failures = 0;
    done = 0;
    for (int k = 0; k < 2; k++) begin
      cin = k[0];
      a = '0; b = '0; c = '0; check_one();
      a = '1; b = '1; c = '1; check_one();
      a = '1; b = '0; c = '0; check_one();
      a = '1; b = '1; c = '0; check_one();
      for (int i = 0; i < N; i++) begin
        a = '0; b = '0; c = '0; a[i] = 1'b1; b[i] = 1'b1; c[i] = 1'b1; check_one();
        a = '1; b = '0; c = '0; a[i] = 1'b0; check_one();
      end
    end
    for (int k = 0; k < NRAND; k++) begin
      for (int j = 0; j < N; j++) begin
        a[j] = 1'($urandom_range(1));
        b[j] = 1'($urandom_range(1));
        c[j] = 1'($urandom_range(1));
      end
      cin = 1'($urandom_range(1));
      check_one();
    end
    done = 1;
  end
endmodule
