// dif_fft: combinational M-point radix-2 decimation-in-frequency FFT.
//
// The first stage pairs x[j] with x[j+M/2] (j = 0 .. M/2-1) and computes
//   a[j] = x[j] + x[j+M/2],   b[j] = (x[j] - x[j+M/2]) * W_M^j.
// The DFT of a gives the even bins and the DFT of b the odd bins, so two
// M/2-point DIF FFTs, one on each half, finish the job. Unrolled, stage s
// (s = 0 .. log2(M)-1) works on blocks of 2h points, h = M/2^(s+1), pairing
// j with j+h inside each block and using the twiddle W_(2h)^j; each stage is
// a generate block whose outputs feed the next. Input is in natural order;
// output position p holds bin bitrev(p) (bit-reversed order), as usual for
// DIF. Twiddles W_(2h)^j = W16^(j*16/(2h)) come from the shared W16 table,
// so M may be 2, 4, 8 or 16.
// Multiplications by W^0 are omitted and by W^4 = -j done by a trivial
// rotator (this design's choice); other products use complex_mult. 16-bit
// wrap-around arithmetic, no registers.
module dif_fft
  import fft_pkg::*;
#(
  parameter int M = 8
) (
  input  cplx_t x [M],
  output cplx_t y [M]
);

  localparam int LOGM = $clog2(M);

  if (M < 2 || M > 16 || (1 << LOGM) != M) begin : g_bad_m
    $error("dif_fft: M must be 2, 4, 8 or 16");
  end

  for (genvar s = 0; s < LOGM; s++) begin : g_stage
    localparam int H = M >> (s + 1);       // half block size
    cplx_t vi [M], vo [M];
    if (s == 0) begin : g_first
      assign vi = x;
    end else begin : g_next
      assign vi = g_stage[s-1].vo;
    end
    for (genvar i = 0; i < M; i++) begin : g_pt
      if ((i % (2 * H)) < H) begin : g_pair
        localparam int E = ((i % (2 * H)) * 16 / (2 * H)) % 16;  // W16 exponent
        cplx_t d;
        r2_butterfly u_bf (.a(vi[i]), .b(vi[i+H]), .sum(vo[i]), .dif(d));
        if (E == 0) begin : g_w0
          assign vo[i+H] = d;
        end else if (E == 4) begin : g_wj
          trivial_rotator u_rot (.a(d), .y(vo[i+H]));
        end else begin : g_wn
          complex_mult u_mul (.a(d), .w(w16(E)), .p(vo[i+H]));
        end
      end
    end
  end

  assign y = g_stage[LOGM-1].vo;

endmodule
