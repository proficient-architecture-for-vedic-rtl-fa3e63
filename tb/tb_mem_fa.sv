// tb_mem_fa: checks the memory-element full adder in two ways.
//  1. Cell level: random ai, bi, ci; si/co must equal ai+bi+ci at once and
//     c_q must show that carry after the next rising edge; reset clears c_q.
//  2. Bit-serial adder: c_q is fed back to ci (the classic serial adder)
//     and random 16-bit operands are applied one bit per clock, least
//     significant bit first. The collected sum bits and final stored carry
//     must equal the 17-bit sum computed in the testbench, one bit per cycle.
module tb_mem_fa;
  localparam int unsigned SERIAL_W = 16;

  logic clk = 1'b0;
  logic rst_n;
  logic ai, bi, ci, si, co, c_q;
  logic serial;      // 1: ci is taken from c_q
  logic ci_ext;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  assign ci = serial ? c_q : ci_ext;

  mem_fa dut (.clk(clk), .rst_n(rst_n), .ai(ai), .bi(bi), .ci(ci),
              .si(si), .co(co), .c_q(c_q));

  initial begin
    repeat (20000) @(posedge clk);
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
    serial = 1'b0;
    ai = 1'b1; bi = 1'b1; ci_ext = 1'b1;
    rst_n = 1'b0;
    #12;
    check(c_q == 1'b0, "reset clears the stored carry");
    rst_n = 1'b1;

    // 1. Cell level.
    for (int n = 0; n < 200; n++) begin
      logic [1:0] s;
      @(negedge clk);
      ai = 1'($urandom); bi = 1'($urandom); ci_ext = 1'($urandom);
      s = 2'(ai) + 2'(bi) + 2'(ci_ext);
      #1;
      check({co, si} == s, "combinational sum and carry");
      @(posedge clk);
      #1;
      check(c_q == s[1], "carry stored on the clock edge");
    end

    // 2. Bit-serial addition with the carry fed back.
    serial = 1'b1;
    for (int n = 0; n < 50; n++) begin
      logic [SERIAL_W-1:0] x, y, got;
      logic [SERIAL_W:0]   expect_sum;
      x = SERIAL_W'($urandom);
      y = SERIAL_W'($urandom);
      if (n == 0) begin x = '1; y = 1; end  // carry through every bit
      expect_sum = {1'b0, x} + {1'b0, y};
      // Clear the stored carry before each word.
      @(negedge clk);
      rst_n = 1'b0;
      #1 rst_n = 1'b1;
      for (int i = 0; i < SERIAL_W; i++) begin
        ai = x[i];
        bi = y[i];
        #1;
        got[i] = si;
        @(posedge clk);
        @(negedge clk);
      end
      check(got == expect_sum[SERIAL_W-1:0], $sformatf("serial sum %h+%h", x, y));
      check(c_q == expect_sum[SERIAL_W], $sformatf("serial carry %h+%h", x, y));
    end

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
