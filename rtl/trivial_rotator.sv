// trivial_rotator: multiplication by W16^4 = -j, the diamond-shaped rotator
// of the radix-2^2 pipeline.
//
// (re + j*im) * (-j) = im - j*re, so the rotator only swaps the two parts and
// negates one; no multiplier is needed, and the real output is simply the
// imaginary input wire. Negating -32768 wraps to -32768.
// Purely combinational.
module trivial_rotator
  import fft_pkg::*;
(
  input  cplx_t a,
  output cplx_t y
);

  always_comb begin
    y.re = a.im;
    y.im = -a.re;
  end

endmodule
