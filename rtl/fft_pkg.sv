// fft_pkg: types, constants and the twiddle table shared by the FFT datapaths.
//
// Samples are complex numbers with 16-bit two's-complement real and imaginary
// parts. Twiddle factors use the same 16-bit words in Q2.14 format (1.0 is
// 16384), so that the 32-bit product of a sample and a twiddle keeps its bits
// 29..14 to return to 16 bits; that word size and bit selection follow the
// original design, the Q2.14 reading of it is this implementation's choice.
//
// w16(k) returns W16^k = exp(-j*2*pi*k/16) quantised to Q2.14:
//   re = round(16384*cos(2*pi*k/16)), im = -round(16384*sin(2*pi*k/16)).
// Only the first-octant values 16384, 15137, 11585 and 6270 are stored; the
// rest follows from quadrant symmetry. Twiddles of smaller transforms come
// from the same table, since W_N^k = W16^(k*16/N).
package fft_pkg;

  localparam int DW   = 16;  // bits per real or imaginary part
  localparam int FRAC = 14;  // fractional bits of a twiddle factor

  typedef logic signed [DW-1:0] word_t;

  typedef struct packed {
    word_t re;
    word_t im;
  } cplx_t;

  // Trig values for 0, 22.5, 45, 67.5 and 90 degrees, Q2.14.
  function automatic word_t trig_q14(input int r);
    case (r)
      0:       return word_t'(16384);
      1:       return word_t'(15137);
      2:       return word_t'(11585);
      3:       return word_t'(6270);
      default: return word_t'(0);
    endcase
  endfunction

  // W16^k for any integer k >= 0.
  function automatic cplx_t w16(input int k);
    int    km, q, r;
    word_t c, s;
    cplx_t w;
    km = k % 16;
    q  = km / 4;
    r  = km % 4;
    // angle = q*90 + r*22.5 degrees; cos and sin of that angle
    case (q)
      0:       begin c =  trig_q14(r);     s =  trig_q14(4 - r); end
      1:       begin c = -trig_q14(4 - r); s =  trig_q14(r);     end
      2:       begin c = -trig_q14(r);     s = -trig_q14(4 - r); end
      default: begin c =  trig_q14(4 - r); s = -trig_q14(r);     end
    endcase
    w.re = c;
    w.im = -s;
    return w;
  endfunction

  // Bit reversal of the low NB bits of v.
  function automatic int bitrev(input int v, input int nb);
    int r;
    r = 0;
    for (int i = 0; i < nb; i++) r = (r << 1) | ((v >> i) & 1);
    return r;
  endfunction

endpackage
