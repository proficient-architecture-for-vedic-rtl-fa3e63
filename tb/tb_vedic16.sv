// tb_vedic16: end-to-end test of the 16x16 Vedic multiplier top at its
// default parameters.
// Operations are started with random gaps and random operands, plus the
// worked example 49982 * 30397 = 1519302854 and the extreme operands. For
// every operation the testbench checks that done comes exactly LATENCY+1
// cycles after the edge that sampled start, that done lasts one cycle,
// that c equals a*b (computed here) and that c holds that value until the
// next done. Pulses of start while busy must be ignored (the operands of
// the running operation stay in force); start pulses that arrive in the
// same cycle as done are likewise ignored. Each mechanism is counted and a
// mechanism that never occurred counts as a failure.
module tb_vedic16;
  localparam int unsigned LAT = vedic_pkg::mult_latency(vedic_pkg::MULT_WIDTH);
  localparam int unsigned NOPS = 400;

  logic clk = 1'b0;
  logic rst_n;
  logic start;
  logic [15:0] a, b;
  logic busy, done;
  logic [31:0] c;
  int checks = 0, failures = 0;
  int n_ops = 0, n_ignored = 0, n_back_to_back = 0, n_held = 0;

  always #5 clk = ~clk;

  vedic16 dut (.clk(clk), .rst_n(rst_n), .start(start), .a(a), .b(b),
               .busy(busy), .done(done), .c(c));

  initial begin
    repeat (NOPS * (LAT + 40) + 1000) @(posedge clk);
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
    logic [31:0] last_c;
    rst_n = 1'b0;
    start = 1'b0;
    a = '0; b = '0;
    #12;
    check(!busy && !done && c == '0, "outputs after reset");
    rst_n = 1'b1;
    last_c = '0;

    for (int n = 0; n < int'(NOPS); n++) begin
      logic [15:0] x, y;
      logic [31:0] expect_c;
      int cycles;
      int gap;
      x = 16'($urandom); y = 16'($urandom);
      if (n == 0) begin x = 16'd49982; y = 16'd30397; end
      if (n == 1) begin x = 16'hFFFF;  y = 16'hFFFF;  end
      if (n == 2) begin x = 16'h0000;  y = 16'h1234;  end
      expect_c = 32'(x) * 32'(y);

      // Idle gap (0 = start again in the cycle right after done).
      gap = (n % 3 == 0) ? 0 : int'($urandom_range(1, 4));
      repeat (gap) begin
        @(negedge clk);
        check(c == last_c, "c holds the previous product while idle");
        n_held++;
      end
      if (gap == 0 && n > 0) n_back_to_back++;

      @(negedge clk);
      check(!busy, "idle before start");
      a = x; b = y; start = 1'b1;
      @(posedge clk);  // start sampled here
      @(negedge clk);
      start = 1'b0;
      check(busy, "busy after start");
      cycles = 0;  // clock edges since the one that sampled start
      while (!done) begin
        // Disturb the inputs and pulse start while busy: must be ignored.
        if (cycles % 7 == 3) begin
          a = 16'($urandom); b = 16'($urandom); start = 1'b1;
          n_ignored++;
        end else begin
          start = 1'b0;
        end
        if (!done) check(c == last_c, "c holds the previous product while busy");
        @(posedge clk);
        @(negedge clk);
        cycles++;
        if (cycles > int'(LAT) + 10) break;
      end
      start = 1'b0;
      check(done, "done arrived");
      check(cycles == int'(LAT) + 1,
            $sformatf("latency %0d cycles, expected %0d", cycles, LAT + 1));
      check(!busy, "busy falls with done");
      check(c == expect_c, $sformatf("%0d*%0d = %0d, got %0d", x, y, expect_c, c));
      if (n == 0) check(c == 32'd1519302854, "worked example product");
      last_c = c;
      n_ops++;
      @(negedge clk);
      check(!done, "done is one cycle long");
      check(c == last_c, "c holds after done");
    end

    // Every mechanism must have occurred.
    check(n_ops == int'(NOPS), "all operations completed");
    check(n_ignored > 0, "start while busy was exercised");
    check(n_back_to_back > 0, "back-to-back operations were exercised");
    check(n_held > 0, "result holding while idle was exercised");
    $display("ops=%0d ignored_starts=%0d back_to_back=%0d idle_hold_checks=%0d latency=%0d",
             n_ops, n_ignored, n_back_to_back, n_held, LAT + 1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
