// tb_mem_mux_adder: checks the registered-carry adder at its default width
// of 16 bits.
// For each operand pair the operands (and carry in) are held stable and the
// sum and carry out are sampled every cycle. The result must equal a+b+cin
// no later than W-1 cycles after the operands were applied (the adder's
// documented settling time) and must stay there. The first pair is
// 0xFFFF + 1, whose carry walks through all stages, so it must take exactly
// W-1 cycles; the test also checks that at least one pair needed all of
// them and that the carry flip-flops' previous contents do not matter.
module tb_mem_mux_adder;
  localparam int unsigned W = 16;
  localparam int unsigned LAT = vedic_pkg::adder_latency(W);

  logic clk = 1'b0;
  logic rst_n;
  logic [W-1:0] a, b, sum;
  logic cin, cout;
  int checks = 0, failures = 0;
  int worst = 0;

  always #5 clk = ~clk;

  mem_mux_adder dut (.clk(clk), .rst_n(rst_n), .a(a), .b(b), .cin(cin),
                     .sum(sum), .cout(cout));

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input logic cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  initial begin
    rst_n = 1'b0;
    a = '0; b = '0; cin = 1'b0;
    #12 rst_n = 1'b1;

    for (int n = 0; n < 400; n++) begin
      logic [W:0] expect_sum;
      int settle;
      @(negedge clk);
      a = W'($urandom); b = W'($urandom); cin = 1'($urandom);
      if (n == 0) begin a = '1; b = 1; cin = 1'b0; end
      if (n == 1) begin a = '0; b = '0; cin = 1'b0; end
      if (n == 2) begin a = '1; b = '0; cin = 1'b1; end
      expect_sum = {1'b0, a} + {1'b0, b} + (W+1)'(cin);
      settle = -1;
      // Cycle k: sampled k clock edges after the operands were applied.
      for (int k = 0; k <= int'(LAT) + 3; k++) begin
        #1;
        if ({cout, sum} == expect_sum) begin
          if (settle < 0) settle = k;
        end else begin
          settle = -1;
        end
        if (k < int'(LAT) + 3) begin
          @(posedge clk);
          @(negedge clk);
        end
      end
      check(settle >= 0 && settle <= int'(LAT),
            $sformatf("%h+%h+%0d settled at cycle %0d (limit %0d)", a, b, cin, settle, LAT));
      if (n == 0) check(settle == int'(LAT), "full carry chain takes W-1 cycles");
      if (settle > worst) worst = settle;
    end
    check(worst == int'(LAT), "some operand pair needed the full settling time");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
