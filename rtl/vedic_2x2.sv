// vedic_2x2: 2x2-bit multiplier by the vertical-and-crosswise
// (Urdhva Tiryakbhyam) rule.
//
// Vertical step: q0 = a0 b0. Crosswise step: the two cross products a1 b0
// and a0 b1 go into a half adder, whose sum is q1 and whose carry moves on.
// Final vertical step: a1 b1 and that carry go into a second half adder,
// giving q2 (sum) and q3 (carry). Four AND gates and two half adders, as in
// the source; the block is purely combinational and is the leaf of the
// recursive multiplier vedic_mult.
//
// Interface: a[1:0], b[1:0] -> q[3:0] = a * b.
module vedic_2x2 (
  input  logic [1:0] a,
  input  logic [1:0] b,
  output logic [3:0] q
);

  logic p00, p10, p01, p11;  // partial products a_i b_j
  logic c1;                  // carry of the crosswise half adder

  always_comb begin
    p00  = a[0] & b[0];
    p10  = a[1] & b[0];
    p01  = a[0] & b[1];
    p11  = a[1] & b[1];
    q[0] = p00;
    q[1] = p10 ^ p01;
    c1   = p10 & p01;
    q[2] = p11 ^ c1;
    q[3] = p11 & c1;
  end

endmodule
