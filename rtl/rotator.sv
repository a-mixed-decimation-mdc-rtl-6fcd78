// rotator: non-trivial rotator of one lane of the 4-parallel pipeline.
//
// The sample a of frame cycle t is multiplied by W16^PHI[t]: the rotation
// memory supplies the coefficient and complex_mult forms the product
// (bits 29..14 of the 32-bit products). Purely combinational; t must be the
// frame cycle of the sample currently on a.
module rotator
  import fft_pkg::*;
#(
  parameter int PHI [4] = '{0, 1, 2, 3}
) (
  input  logic [1:0] t,
  input  cplx_t      a,
  output cplx_t      y
);

  cplx_t w;

  rotation_memory #(.PHI(PHI)) u_mem (.t(t), .w(w));
  complex_mult                 u_mul (.a(a), .w(w), .p(y));

endmodule
