// tb_vedic_mult8: checks the 8x8 Vedic multiplier vedic_mult8.
// Each operand pair is held stable and the product is sampled once per
// clock cycle. It must equal a*b (computed here) no later than
// vedic_pkg::mult_latency(8) cycles after the operands were applied and
// stay there until the operands change. Operand pairs: all operand pairs.
// The worst settling time seen is printed.
module tb_vedic_mult8;
  localparam int unsigned N   = 8;
  localparam int unsigned LAT = vedic_pkg::mult_latency(N);

  logic clk = 1'b0;
  logic rst_n;
  logic [N-1:0]   a, b;
  logic [2*N-1:0] q;
  int checks = 0, failures = 0;
  int worst = 0;

  always #5 clk = ~clk;

  vedic_mult8 dut (.clk(clk), .rst_n(rst_n), .a(a), .b(b), .q(q));

  initial begin
    repeat (4000000) @(posedge clk);
    failures++;
    $display("watchdog expired");
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

  // Hold x, y for LAT+2 cycles; check the product settled in time.
  task automatic run_pair(input logic [N-1:0] x, input logic [N-1:0] y);
    logic [2*N-1:0] expect_q;
    int settle;
    @(negedge clk);
    a = x;
    b = y;
    expect_q = (2*N)'(x) * (2*N)'(y);
    settle = -1;
    for (int k = 0; k <= int'(LAT) + 2; k++) begin
      #1;
      if (q == expect_q) begin
        if (settle < 0) settle = k;
      end else begin
        settle = -1;
      end
      if (k < int'(LAT) + 2) begin
        @(posedge clk);
        @(negedge clk);
      end
    end
    check(settle >= 0 && settle <= int'(LAT),
          $sformatf("%0d*%0d settled at cycle %0d (limit %0d), q=%0d", x, y, settle, LAT, q));
    if (settle > worst) worst = settle;
  endtask

  initial begin
    rst_n = 1'b0;
    a = '0;
    b = '0;
    #12 rst_n = 1'b1;
    for (int i = 0; i < (1 << N); i++) begin
      for (int j = 0; j < (1 << N); j++) begin
        run_pair(N'(i), N'(j));
      end
    end
    $display("worst settling time %0d cycles, bound %0d", worst, LAT);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
