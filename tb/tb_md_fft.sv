// tb_md_fft: self-checking test of the combinational mixed-decimation FFT.
//
// Drives a 16-point instance (the default) and an 8-point instance with
// impulses, constants, single tones and random vectors, and compares every
// output bin, which must appear in natural order (y[k] = X[k]), with a
// double-precision DFT within TOL LSBs. A watchdog ends a hung run as failed.
module tb_md_fft;
  import fft_pkg::*;
  import tb_fft_pkg::*;

  localparam int  NVEC = 200;
  localparam int  AMP  = 1000;
  localparam real TOL  = 10.0;

  cplx_t x16 [16], y16 [16];
  cplx_t x8 [8], y8 [8];
  cplx_t ref_in [16];

  int  checks = 0, failures = 0;
  real maxerr = 0.0;

  md_fft              dut16 (.x(x16), .y(y16));
  md_fft #(.N(8))     dut8  (.x(x8),  .y(y8));

  initial begin : watchdog
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check_bin(input cplx_t h, input int n, input int k);
    rcplx_t r;
    real    e;
    r = dft(ref_in, n, k);
    e = cdist(h, r);
    if (e > maxerr) maxerr = e;
    checks++;
    if (e > TOL) begin
      failures++;
      $display("FAIL: N=%0d X[%0d] = (%0d, %0d), expected (%.1f, %.1f)",
               n, k, h.re, h.im, r.re, r.im);
    end
  endtask

  function automatic cplx_t vec(input int v, input int n, input int i);
    cplx_t c;
    case (v)
      0: c = (i == 0) ? '{re: 16'sd1000, im: 16'sd0} : '0;
      1: c = (i == 5 % n) ? '{re: -16'sd600, im: 16'sd1200} : '0;
      2: c = '{re: 16'sd900, im: 16'sd250};
      3: c = '{re: word_t'($rtoi(1400.0 * $cos(2.0 * PI * 3 * i / n))),
               im: word_t'($rtoi(-1400.0 * $sin(2.0 * PI * 3 * i / n)))};
      default: c = rand_sample(AMP);
    endcase
    return c;
  endfunction

  initial begin
    for (int v = 0; v < NVEC; v++) begin
      for (int i = 0; i < 16; i++) begin
        ref_in[i] = vec(v, 16, i);
        x16[i]    = ref_in[i];
      end
      #1;
      for (int k = 0; k < 16; k++) check_bin(y16[k], 16, k);
      for (int i = 0; i < 16; i++) ref_in[i] = (i < 8) ? vec(v, 8, i) : '0;
      for (int i = 0; i < 8; i++) x8[i] = ref_in[i];
      #1;
      for (int k = 0; k < 8; k++) check_bin(y8[k], 8, k);
    end
    $display("max error %.2f LSB", maxerr);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
