// icn_pkg: constants and helpers shared by the iterative computation networks.
//
// The networks in this library are built from three parts only: a multiplier
// by a constant coefficient, a two-input adder and the Z unit (a one-cycle
// register). The default sizes below are the ones the networks are drawn at:
// a four-tap filter and polynomials of degree three. The 16-bit word width is
// a choice of this implementation; the networks carry no width of their own.
//
// All polynomial networks compute in the ring of integers modulo 2**W (plain
// two's-complement wrap-around). In that ring a coefficient has an inverse
// exactly when it is odd, which is what the dividers need for their leading
// coefficient. inv_mod2w() returns that inverse; a caller keeps the low W bits.
package icn_pkg;

  localparam int unsigned FIR_TAPS = 4;   // N of the FIR filter
  localparam int unsigned POLY_DEG = 3;   // c, degree of the fixed polynomials
  localparam int unsigned DATA_W   = 16;  // word width of samples and coefficients

  // Inverse of an odd number modulo 2**64 by Newton iteration:
  // x <- x * (2 - a*x) doubles the number of correct low bits; an odd a is
  // its own inverse modulo 8, so five steps give 96 >= 64 correct bits.
  function automatic logic [63:0] inv_mod2w(input logic [63:0] a);
    logic [63:0] x;
    x = a;
    for (int k = 0; k < 5; k++) begin
      x = x * (64'd2 - a * x);
    end
    return x;
  endfunction

endpackage
