// tb_dif_fft: self-checking test of the combinational radix-2 DIF FFT.
//
// Drives the default 8-point instance and a 4-point instance with impulses,
// constants and random vectors. A DIF FFT returns its bins in bit-reversed
// order, so output position p is compared with the double-precision DFT
// bin bitrev(p), within TOL LSBs. A watchdog ends a hung run as failed.
module tb_dif_fft;
  import fft_pkg::*;
  import tb_fft_pkg::*;

  localparam int  NVEC = 200;
  localparam int  AMP  = 2000;
  localparam real TOL  = 8.0;

  cplx_t x8 [8], y8 [8];
  cplx_t x4 [4], y4 [4];
  cplx_t ref_in [16];

  int  checks = 0, failures = 0;
  real maxerr = 0.0;

  dif_fft          dut8 (.x(x8), .y(y8));
  dif_fft #(.M(4)) dut4 (.x(x4), .y(y4));

  initial begin : watchdog
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check_pos(input cplx_t h, input int n, input int p);
    rcplx_t r;
    real    e;
    r = dft(ref_in, n, bitrev(p, $clog2(n)));
    e = cdist(h, r);
    if (e > maxerr) maxerr = e;
    checks++;
    if (e > TOL) begin
      failures++;
      $display("FAIL: M=%0d position %0d = (%0d, %0d), expected (%.1f, %.1f)",
               n, p, h.re, h.im, r.re, r.im);
    end
  endtask

  initial begin
    for (int v = 0; v < NVEC; v++) begin
      for (int i = 0; i < 16; i++)
        ref_in[i] = (i >= 8) ? '0 :
                    (v == 0) ? ((i == 0) ? '{re: 16'sd1000, im: 16'sd0} : '0) :
                    (v == 1) ? '{re: -16'sd500, im: 16'sd800} :
                    rand_sample(AMP);
      for (int i = 0; i < 8; i++) x8[i] = ref_in[i];
      #1;
      for (int p = 0; p < 8; p++) check_pos(y8[p], 8, p);
      for (int i = 4; i < 16; i++) ref_in[i] = '0;
      for (int i = 0; i < 4; i++) x4[i] = ref_in[i];
      #1;
      for (int p = 0; p < 4; p++) check_pos(y4[p], 4, p);
    end
    $display("max error %.2f LSB", maxerr);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
