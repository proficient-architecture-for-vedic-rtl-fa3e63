// vedic_mult4: 4x4-bit Vedic multiplier.
//
// Vertical and crosswise multiplication one level up from vedic_2x2: the operands
// are split into 2-bit halves, four vedic_2x2 blocks form the products
// aL*bL, aH*bL, aL*bH and aH*bH at the same time, and vedic_combine adds
// them with three memory-based adders. This is the arrangement the source
// draws for the 16-bit multiplier, applied at every level as it describes
// ("the same architecture can be expanded" from the 2x2 building block).
//
// Timing: the state is the carry flip-flops inside the adders. With a and b
// held stable, q is final after at most vedic_pkg::mult_latency(4) =
// clock cycles; q may show intermediate values before that.
//
// Interface: clk, rst_n (asynchronous, active low, clears stored carries),
// a, b (4 bits) -> q (8 bits) = a * b.
module vedic_mult4 (
  input  logic        clk,
  input  logic        rst_n,
  input  logic [3:0] a,
  input  logic [3:0] b,
  output logic [7:0] q
);

  localparam int unsigned N = 4;
  localparam int unsigned H = N / 2;

  logic [N-1:0] q0, q1, q2, q3;

  vedic_2x2 u_ll (.a(a[H-1:0]), .b(b[H-1:0]), .q(q0));
  vedic_2x2 u_hl (.a(a[N-1:H]), .b(b[H-1:0]), .q(q1));
  vedic_2x2 u_lh (.a(a[H-1:0]), .b(b[N-1:H]), .q(q2));
  vedic_2x2 u_hh (.a(a[N-1:H]), .b(b[N-1:H]), .q(q3));

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
