// tb_vedic_combine: checks the adder stage of the Vedic multiplier at its
// default size (N = 16, adders of 16, 24 and 24 bits).
// The four inputs are products of random 8-bit operand halves, formed in
// the testbench (q0 = aL*bL, q1 = aH*bL, q2 = aL*bH, q3 = aH*bH), so the
// output must equal the full 16x16 product a*b. Each input set is held
// stable; the output must reach that value within
// max(N-1, 3N/2-1) + 3N/2-1 = 46 cycles and stay there. The first set
// (a = b = 0xFFFF) and a set whose sum carries through all of the final
// adder are included.
module tb_vedic_combine;
  localparam int unsigned N   = 16;
  localparam int unsigned H   = N / 2;
  localparam int unsigned LAT = 2 * vedic_pkg::adder_latency(3 * N / 2);

  logic clk = 1'b0;
  logic rst_n;
  logic [N-1:0]   q0, q1, q2, q3;
  logic [2*N-1:0] q;
  int checks = 0, failures = 0;
  int worst = 0;

  always #5 clk = ~clk;

  vedic_combine dut (.clk(clk), .rst_n(rst_n), .q0(q0), .q1(q1), .q2(q2), .q3(q3), .q(q));

  initial begin
    repeat (200000) @(posedge clk);
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

  initial begin
    rst_n = 1'b0;
    {q0, q1, q2, q3} = '0;
    #12 rst_n = 1'b1;
    for (int n = 0; n < 1000; n++) begin
      logic [N-1:0] x, y;
      logic [2*N-1:0] expect_q;
      int settle;
      x = N'($urandom);
      y = N'($urandom);
      if (n == 0) begin x = '1; y = '1; end
      if (n == 1) begin x = 16'h00FF; y = 16'h0101; end
      @(negedge clk);
      q0 = N'(x[H-1:0]) * N'(y[H-1:0]);
      q1 = N'(x[N-1:H]) * N'(y[H-1:0]);
      q2 = N'(x[H-1:0]) * N'(y[N-1:H]);
      q3 = N'(x[N-1:H]) * N'(y[N-1:H]);
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
            $sformatf("%0d*%0d settled at cycle %0d (limit %0d)", x, y, settle, LAT));
      if (settle > worst) worst = settle;
    end
    $display("worst settling time %0d cycles, bound %0d", worst, LAT);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
