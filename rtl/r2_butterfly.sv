// r2_butterfly: radix-2 butterfly, the "R2" block of the pipelined FFT and the
// add/subtract pair of every flow-graph stage.
//
// sum = a + b and dif = a - b, each on real and imaginary part separately.
// Results keep the 16-bit word of the inputs and wrap on overflow: the
// datapath keeps a fixed 16-bit representation throughout, and scaling the
// input so that the transform does not overflow is left to the user (this
// design's choice; the original names no scaling). Purely combinational.
module r2_butterfly
  import fft_pkg::*;
(
  input  cplx_t a,
  input  cplx_t b,
  output cplx_t sum,
  output cplx_t dif
);

  always_comb begin
    sum.re = a.re + b.re;
    sum.im = a.im + b.im;
    dif.re = a.re - b.re;
    dif.im = a.im - b.im;
  end

endmodule
