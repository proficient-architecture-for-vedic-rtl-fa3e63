// vedic16: 16x16-bit Vedic multiplier with memory-based adders (top level).
//
// The product is formed by vedic_mult16, the vertical-and-crosswise
// multiplier whose adders keep every inter-stage carry in a flip-flop. Such
// a network gives the right product only once its carries have walked
// through every adder, so the top wraps it in a small sequencer:
//   * start (sampled while idle) loads a and b into operand registers and
//     raises busy; start while busy is ignored.
//   * a counter lets LATENCY = vedic_pkg::mult_latency(N) cycles pass with
//     the operands held (78 cycles for N = 16).
//   * on the next edge the settled product is captured into c, busy falls
//     and done is high for one cycle. c holds its value until the next
//     product is captured.
// From the clock edge that samples start to the edge that raises done there
// are LATENCY + 1 cycles. The multiplier structure and the 16-bit operands
// follow the source; the operand registers, the start/busy/done sequencer
// and the latency bound are this design's own, since the source shows only
// operands, a clock and the product.
//
// Interface: clk, rst_n (asynchronous, active low), start, a[15:0],
// b[15:0] -> busy, done, c[31:0].
module vedic16 (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        start,
  input  logic [15:0] a,
  input  logic [15:0] b,
  output logic        busy,
  output logic        done,
  output logic [31:0] c
);

  localparam int unsigned N       = vedic_pkg::MULT_WIDTH;  // 16
  localparam int unsigned LATENCY = vedic_pkg::mult_latency(N);
  localparam int unsigned CW      = $clog2(LATENCY + 2);

  logic [N-1:0]   a_q, b_q;
  logic [2*N-1:0] prod;
  logic [CW-1:0]  cnt;

  vedic_mult16 u_mult (
    .clk  (clk),
    .rst_n(rst_n),
    .a    (a_q),
    .b    (b_q),
    .q    (prod)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      a_q  <= '0;
      b_q  <= '0;
      cnt  <= '0;
      busy <= 1'b0;
      done <= 1'b0;
      c    <= '0;
    end else begin
      done <= 1'b0;
      if (!busy) begin
        if (start) begin
          a_q  <= a;
          b_q  <= b;
          cnt  <= '0;
          busy <= 1'b1;
        end
      end else if (cnt == CW'(LATENCY)) begin
        c    <= prod;
        busy <= 1'b0;
        done <= 1'b1;
      end else begin
        cnt <= cnt + 1'b1;
      end
    end
  end

  // done is a single-cycle pulse that only ends a busy period.
  assert property (@(posedge clk) disable iff (!rst_n) done |-> !busy && !$past(done))
    else $error("vedic16: done must be a single pulse after busy");

endmodule
