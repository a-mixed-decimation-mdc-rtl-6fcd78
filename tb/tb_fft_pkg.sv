// tb_fft_pkg: reference arithmetic shared by the FFT testbenches.
//
// dft() evaluates X[k] = sum_n x[n]*exp(-j*2*pi*k*n/N) in double precision,
// independently of the fixed-point hardware; near() compares a hardware
// result with it within a tolerance given in LSBs; rand_sample() draws a
// complex sample whose parts lie in [-A, A].
package tb_fft_pkg;
  import fft_pkg::*;

  localparam real PI = 3.14159265358979323846;

  typedef struct {
    real re;
    real im;
  } rcplx_t;

  function automatic rcplx_t dft(input cplx_t x [16], input int n, input int k);
    rcplx_t r;
    real    ang;
    r.re = 0.0;
    r.im = 0.0;
    for (int i = 0; i < n; i++) begin
      ang  = -2.0 * PI * real'(k * i) / real'(n);
      r.re = r.re + real'(x[i].re) * $cos(ang) - real'(x[i].im) * $sin(ang);
      r.im = r.im + real'(x[i].re) * $sin(ang) + real'(x[i].im) * $cos(ang);
    end
    return r;
  endfunction

  function automatic real absr(input real v);
    return (v < 0.0) ? -v : v;
  endfunction

  // largest part-wise distance between a hardware value and a reference
  function automatic real cdist(input cplx_t h, input rcplx_t r);
    real dr, di;
    dr = absr(real'(h.re) - r.re);
    di = absr(real'(h.im) - r.im);
    return (dr > di) ? dr : di;
  endfunction

  function automatic cplx_t rand_sample(input int amp);
    cplx_t c;
    c.re = word_t'(int'($urandom_range(2 * amp)) - amp);
    c.im = word_t'(int'($urandom_range(2 * amp)) - amp);
    return c;
  endfunction

endpackage
