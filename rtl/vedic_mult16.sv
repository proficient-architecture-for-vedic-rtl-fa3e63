// vedic_mult16: 16x16-bit Vedic multiplier.
//
// Vertical and crosswise multiplication one level up from vedic_mult8: the operands
// are split into 8-bit halves, four vedic_mult8 blocks form the products
// aL*bL, aH*bL, aL*bH and aH*bH at the same time, and vedic_combine adds
// them with three memory-based adders. This is the arrangement the source
// draws for the 16-bit multiplier, applied at every level as it describes
// ("the same architecture can be expanded" from the 2x2 building block).
//
// Timing: the state is the carry flip-flops inside the adders. With a and b
// held stable, q is final after at most vedic_pkg::mult_latency(16) =
// clock cycles; q may show intermediate values before that.
//
// Interface: clk, rst_n (asynchronous, active low, clears stored carries),
// a, b (16 bits) -> q (32 bits) = a * b.
module vedic_mult16 (
  input  logic        clk,
  input  logic        rst_n,
  input  logic [15:0] a,
  input  logic [15:0] b,
  output logic [31:0] q
);

  localparam int unsigned N = 16;
  localparam int unsigned H = N / 2;

  logic [N-1:0] q0, q1, q2, q3;

  vedic_mult8 u_ll (.clk(clk), .rst_n(rst_n), .a(a[H-1:0]), .b(b[H-1:0]), .q(q0));
  vedic_mult8 u_hl (.clk(clk), .rst_n(rst_n), .a(a[N-1:H]), .b(b[H-1:0]), .q(q1));
  vedic_mult8 u_lh (.clk(clk), .rst_n(rst_n), .a(a[H-1:0]), .b(b[N-1:H]), .q(q2));
  vedic_mult8 u_hh (.clk(clk), .rst_n(rst_n), .a(a[N-1:H]), .b(b[N-1:H]), .q(q3));

  vedic_combine #(.N(N)) u_combine (
    .clk  (clk),
    .rst_n(rst_n),
    .q0   (q0),
    .q1   (q1),
    .q2   (q2),
    .q3   (q3),
    .q    (q)
  );

endmodule
