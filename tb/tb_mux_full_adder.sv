// tb_mux_full_adder: exhaustive check of the multiplexer full adder.
// All eight input combinations are applied; sum and carry are compared with
// the arithmetic sum a + b + c computed in the testbench.
module tb_mux_full_adder;
  logic a, b, c, sum, carry;
  int checks = 0, failures = 0;

  mux_full_adder dut (.a(a), .b(b), .c(c), .sum(sum), .carry(carry));

  initial begin
    #10000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 8; v++) begin
      logic [1:0] expect_sum;
      {a, b, c} = 3'(v);
      #1;
      expect_sum = 2'(a) + 2'(b) + 2'(c);
      checks++;
      if ({carry, sum} !== expect_sum) begin
        failures++;
        $display("mismatch a=%b b=%b c=%b: got carry=%b sum=%b", a, b, c, carry, sum);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
