// rotation_memory: coefficient memory of one non-trivial rotator.
//
// A lane of the 4-parallel pipeline sees one sample per clock cycle of a
// 4-cycle frame; in frame cycle t it must be rotated by W16^PHI[t]. PHI holds
// the four exponents printed next to each rotator of the architecture
// (0 1 2 3, 0 2 4 6 and 0 3 6 9). The table is built at elaboration from
// fft_pkg::w16 and read combinationally with the 2-bit frame cycle t.
// Output w is Q2.14.
module rotation_memory
  import fft_pkg::*;
#(
  parameter int PHI [4] = '{0, 1, 2, 3}
) (
  input  logic [1:0] t,
  output cplx_t      w
);

  cplx_t rom [4];

  for (genvar i = 0; i < 4; i++) begin : g_rom
    assign rom[i] = w16(PHI[i]);
  end

  assign w = rom[t];

endmodule
