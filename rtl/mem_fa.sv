// mem_fa: memory-element full adder, the cell of the memory-based adder.
//
// A multiplexer full adder adds ai, bi and the carry ci; its carry out is
// written into a D flip-flop on each rising clock edge, and the stored
// carry is the cell's output c_q. Feeding c_q back into ci gives the
// classic bit-serial adder (operands applied one bit per clock, least
// significant bit first); feeding c_q into the next cell's ci gives the
// cascaded adder of mem_mux_adder, in which every carry hop costs one clock.
// The source shows the flip-flop with set and reset pins; only the reset is
// used here, as an asynchronous active-low clear of the stored carry.
//
// Interface: clk, rst_n, ai, bi, ci -> si (combinational sum of the current
// inputs), co (combinational carry out), c_q (carry stored at the last edge).
module mem_fa (
  input  logic clk,
  input  logic rst_n,
  input  logic ai,
  input  logic bi,
  input  logic ci,
  output logic si,
  output logic co,
  output logic c_q
);

  mux_full_adder u_fa (
    .a    (ai),
    .b    (bi),
    .c    (ci),
    .sum  (si),
    .carry(co)
  );

  // Delay element: stores the present carry.
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) c_q <= 1'b0;
    else        c_q <= co;
  end

endmodule
