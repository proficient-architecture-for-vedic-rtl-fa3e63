// vedic_pkg: constants and timing functions shared by the Vedic multiplier.
//
// The adders of this multiplier keep the carry between neighbouring bit
// stages in a flip-flop, so a W-bit adder needs W-1 clock cycles after its
// operands become stable before its sum is final. The functions below give
// that settling time for one adder and, recursively, an upper bound for a
// whole N x N multiplier built from N/2 x N/2 blocks. The bound is this
// design's own derivation; the source only gives the structure.
package vedic_pkg;

  // Operand width of the multiplier the design is built around.
  localparam int unsigned MULT_WIDTH = 16;

  // Cycles a registered-carry ripple adder of `width` bits needs after its
  // operands are stable until sum and carry out are final.
  function automatic int unsigned adder_latency(input int unsigned width);
    return (width > 0) ? width - 1 : 0;
  endfunction

  // Upper bound on the settling time of an n x n multiplier. A 2x2 block is
  // purely combinational. A larger block waits for its four halves, then for
  // the wider of its two first-level adders (n and 3n/2 bits), then for the
  // 3n/2-bit final adder.
  function automatic int unsigned mult_latency(input int unsigned n);
    int unsigned first_level;
    if (n <= 2) return 0;
    first_level = (adder_latency(n) > adder_latency(3 * n / 2)) ?
                  adder_latency(n) : adder_latency(3 * n / 2);
    return mult_latency(n / 2) + first_level + adder_latency(3 * n / 2);
  endfunction

endpackage
