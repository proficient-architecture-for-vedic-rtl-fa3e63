// mux_full_adder: one-bit full adder built from an XOR gate and two 2:1
// multiplexers.
//
// x = b ^ c is the select of both multiplexers. When b and c are equal
// (x = 0) the sum is a and the carry is b (both inputs b and c carry the
// same value, so they alone decide the carry). When they differ (x = 1) the
// sum is ~a and the carry is a. This is the multiplexer full adder the
// design uses in every adder stage; its data inputs (A and ~A for the sum,
// B and A for the carry) follow the source, while which data input sits on
// select value 0 is derived here from the full-adder truth table.
//
// Interface: a, b, c (carry in) -> sum, carry. Purely combinational.
module mux_full_adder (
  input  logic a,
  input  logic b,
  input  logic c,
  output logic sum,
  output logic carry
);

  logic x;

  always_comb begin
    x     = b ^ c;
    sum   = x ? ~a : a;
    carry = x ?  a : b;
  end

endmodule
