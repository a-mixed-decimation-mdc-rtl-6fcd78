// md_fft: combinational N-point mixed-decimation FFT (DIF inside, DIT last),
// which delivers its output in natural order without a reordering memory.
//
// The even samples x[2m] and the odd samples x[2m+1] are each transformed by
// an N/2-point decimation-in-frequency FFT (dif_fft). A DIF FFT leaves its
// bins in bit-reversed positions; the "transition" moves position p to
// position bitrev(p), which with all N samples present at once is plain
// wiring. A final radix-2 decimation-in-time stage then combines the two
// half-size spectra E and O:
//   X[k]       = E[k] + W_N^k * O[k]
//   X[k + N/2] = E[k] - W_N^k * O[k],   k = 0 .. N/2-1,
// so X comes out in natural order. This structure (even/odd split, DIF
// halves, transition, DIT last stage) follows the original design for N = 8
// and N = 16; N may be 4, 8 or 16 (twiddles come from the W16 table).
// W_N^k = W16^(k*16/N); multiplications by W^0 are omitted and by -j done by a
// trivial rotator. 16-bit wrap-around arithmetic; no registers, so the
// transform is one combinational path from x to y.
module md_fft
  import fft_pkg::*;
#(
  parameter int N = 16
) (
  input  cplx_t x [N],
  output cplx_t y [N]
);

  localparam int H    = N / 2;
  localparam int LOGH = $clog2(H);

  if (N < 4 || N > 16 || (1 << $clog2(N)) != N) begin : g_bad_n
    $error("md_fft: N must be 4, 8 or 16");
  end

  cplx_t xe [H], xo [H];     // even / odd time samples
  cplx_t fe [H], fo [H];     // DIF outputs, bit-reversed positions
  cplx_t ne [H], no [H];     // after the transition, natural order

  for (genvar m = 0; m < H; m++) begin : g_split
    assign xe[m] = x[2*m];
    assign xo[m] = x[2*m+1];
  end

  dif_fft #(.M(H)) u_dif_even (.x(xe), .y(fe));
  dif_fft #(.M(H)) u_dif_odd  (.x(xo), .y(fo));

  // transition: DIF position bitrev(k) holds bin k
  for (genvar k = 0; k < H; k++) begin : g_transition
    assign ne[k] = fe[bitrev(k, LOGH)];
    assign no[k] = fo[bitrev(k, LOGH)];
  end

  // final radix-2 DIT stage
  for (genvar k = 0; k < H; k++) begin : g_dit
    localparam int E = (k * 16 / N) % 16;   // W16 exponent of W_N^k
    cplx_t wo;
    if (E == 0) begin : g_w0
      assign wo = no[k];
    end else if (E == 4) begin : g_wj
      trivial_rotator u_rot (.a(no[k]), .y(wo));
    end else begin : g_wn
      complex_mult u_mul (.a(no[k]), .w(w16(E)), .p(wo));
    end
    r2_butterfly u_bf (.a(ne[k]), .b(wo), .sum(y[k]), .dif(y[k+H]));
  end

endmodule
