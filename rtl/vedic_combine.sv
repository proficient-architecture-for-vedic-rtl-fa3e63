// vedic_combine: adder stage of an N x N Vedic multiplier.
//
// Takes the four crosswise products of N/2-bit operand halves,
//   q0 = aL*bL, q1 = aH*bL, q2 = aL*bH, q3 = aH*bH,
// and sums them with three memory-based adders (mem_mux_adder):
//   s1 = q1 + {0, q0[N-1:N/2]}                     (N bits)
//   s2 = {q3, N/2 zeros} + {N/2 zeros, q2}         (3N/2 bits)
//   s3 = s2 + {0, s1}                              (3N/2 bits)
// The product is q = {s3, q0[N/2-1:0]}. The three adders, their operand
// padding and the pass-through of q0's low half follow the source's 16-bit
// diagram; the adder widths are the smallest that hold each sum, so none
// of the carry outs can be set by valid products and they are left open
// (the empty pin connections stand for that).
//
// Timing: with the inputs stable, q is final after at most
// max(N-1, 3N/2-1) + 3N/2-1 clock cycles (the adders' registered carries
// must walk through them); nothing signals when.
//
// Interface: clk, rst_n (asynchronous, active low, clears stored carries),
// q0..q3 (N bits each) -> q (2N bits).
module vedic_combine #(
  parameter int unsigned N = 16
) (
  input  logic           clk,
  input  logic           rst_n,
  input  logic [N-1:0]   q0,
  input  logic [N-1:0]   q1,
  input  logic [N-1:0]   q2,
  input  logic [N-1:0]   q3,
  output logic [2*N-1:0] q
);

  localparam int unsigned H = N / 2;     // operand half width
  localparam int unsigned W = 3 * N / 2; // width of the two outer adders

  logic [N-1:0] s1;
  logic [W-1:0] s2, s3;

  mem_mux_adder #(.W(N)) u_add1 (
    .clk  (clk),
    .rst_n(rst_n),
    .a    (q1),
    .b    ({{H{1'b0}}, q0[N-1:H]}),
    .cin  (1'b0),
    .sum  (s1),
    .cout ()
  );

  mem_mux_adder #(.W(W)) u_add2 (
    .clk  (clk),
    .rst_n(rst_n),
    .a    ({q3, {H{1'b0}}}),
    .b    ({{H{1'b0}}, q2}),
    .cin  (1'b0),
    .sum  (s2),
    .cout ()
  );

  mem_mux_adder #(.W(W)) u_add3 (
    .clk  (clk),
    .rst_n(rst_n),
    .a    (s2),
    .b    ({{H{1'b0}}, s1}),
    .cin  (1'b0),
    .sum  (s3),
    .cout ()
  );

  assign q = {s3, q0[H-1:0]};

  initial begin
    assert (N >= 4 && N % 2 == 0) else $error("vedic_combine: N must be even and at least 4");
  end

endmodule
