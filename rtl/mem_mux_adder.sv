// mem_mux_adder: W-bit memory-element and multiplexer based adder.
//
// W one-bit multiplexer full adders are cascaded as in a ripple-carry
// adder, operand bit 0 at stage 0, but the carry that leaves stage i is
// stored in that stage's flip-flop (mem_fa) before it enters stage i+1.
// The combinational path is therefore a single full adder, which is what
// makes this the fastest adder of the design; the price is that a carry
// moves one stage per clock. With the operands held stable, stage i has
// its final carry in after i clock edges, so the whole sum and the carry
// out are final W-1 cycles after the operands (vedic_pkg::adder_latency).
// The settled result does not depend on what the carry flip-flops held
// before, so no clear is needed between additions. The last stage drives
// only the carry out and needs no flip-flop.
//
// The cascade of one-bit adders and the 16-bit default width follow the
// source; placing the memory element on every inter-stage carry is this
// design's reading of how the memory element and the multiplexer adder
// are combined.
//
// Interface: clk, rst_n (asynchronous, active low, clears the stored
// carries), a, b (W bits), cin -> sum (W bits), cout.
module mem_mux_adder #(
  parameter int unsigned W = 16
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic [W-1:0] a,
  input  logic [W-1:0] b,
  input  logic         cin,
  output logic [W-1:0] sum,
  output logic         cout
);

  // carry[i] is the carry into stage i.
  logic [W-1:0] carry;

  assign carry[0] = cin;

  for (genvar i = 0; i < W - 1; i++) begin : g_stage
    mem_fa u_cell (
      .clk  (clk),
      .rst_n(rst_n),
      .ai   (a[i]),
      .bi   (b[i]),
      .ci   (carry[i]),
      .si   (sum[i]),
      .co   (),
      .c_q  (carry[i+1])
    );
  end

  mux_full_adder u_last (
    .a    (a[W-1]),
    .b    (b[W-1]),
    .c    (carry[W-1]),
    .sum  (sum[W-1]),
    .carry(cout)
  );

  initial begin
    assert (W >= 2) else $error("mem_mux_adder: W must be at least 2");
  end

endmodule
