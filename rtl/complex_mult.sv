// complex_mult: multiplies a 16-bit complex sample by a Q2.14 twiddle factor.
//
// p = a * w computed with four 16x16 real products. Each real and imaginary
// sum of products is a 33-bit value scaled by 2^14; bits 29..14 are kept,
// which returns the result to 16 bits (truncation toward minus infinity);
// the other bits of the wide sums are deliberately unused.
// Selecting bits 29..14 of the 32-bit product follows the original design;
// the four-multiplier structure and truncation instead of rounding are this
// implementation's choices. Purely combinational.
module complex_mult
  import fft_pkg::*;
#(
  parameter int FRAC_BITS = FRAC
) (
  input  cplx_t a,
  input  cplx_t w,
  output cplx_t p
);

  logic signed [2*DW:0] pre, pim;

  always_comb begin
    pre  = (2*DW+1)'(a.re * w.re) - (2*DW+1)'(a.im * w.im);
    pim  = (2*DW+1)'(a.re * w.im) + (2*DW+1)'(a.im * w.re);
    p.re = pre[FRAC_BITS +: DW];
    p.im = pim[FRAC_BITS +: DW];
  end

endmodule
