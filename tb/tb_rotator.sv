// tb_rotator: self-checking test of the non-trivial rotator.
//
// Three rotators with the pipeline's coefficient lists rotate random samples;
// for frame cycle t the result must be within 2 LSB of a*exp(-j*2*pi*phi/16)
// computed in real arithmetic, phi = PHI[t].
module tb_rotator;
  import fft_pkg::*;
  import tb_fft_pkg::*;

  logic [1:0] t;
  cplx_t a, y1, y2, y3;
  int checks = 0, failures = 0;

  rotator                        dut1 (.t, .a, .y(y1));
  rotator #(.PHI('{0, 2, 4, 6})) dut2 (.t, .a, .y(y2));
  rotator #(.PHI('{0, 3, 6, 9})) dut3 (.t, .a, .y(y3));

  initial begin : watchdog
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input cplx_t y, input int phi);
    rcplx_t r;
    real    ang;
    ang  = -2.0 * PI * phi / 16.0;
    r.re = real'(a.re) * $cos(ang) - real'(a.im) * $sin(ang);
    r.im = real'(a.re) * $sin(ang) + real'(a.im) * $cos(ang);
    checks++;
    if (cdist(y, r) > 2.0) begin
      failures++;
      $display("FAIL: phi=%0d a=(%0d,%0d) y=(%0d,%0d) expected (%.1f,%.1f)",
               phi, a.re, a.im, y.re, y.im, r.re, r.im);
    end
  endtask

  initial begin
    for (int i = 0; i < 800; i++) begin
      t = 2'(i % 4);
      a = rand_sample(20000);
      #1;
      check(y1, i % 4);
      check(y2, 2 * (i % 4));
      check(y3, 3 * (i % 4));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
