// tb_trivial_rotator: self-checking test of the -j rotator.
//
// For random samples a, the output must equal a*(-j) = a.im - j*a.re,
// with -(-32768) wrapping to -32768.
module tb_trivial_rotator;
  import fft_pkg::*;

  cplx_t a, y;
  int checks = 0, failures = 0;

  trivial_rotator dut (.a, .y);

  initial begin : watchdog
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 1000; i++) begin
      int ar, ai;
      ar = (i == 0) ? -32768 : int'($urandom_range(65535)) - 32768;
      ai = int'($urandom_range(65535)) - 32768;
      a = '{re: word_t'(ar), im: word_t'(ai)};
      #1;
      checks++;
      if (y.re !== word_t'(ai) || y.im !== word_t'(-ar)) begin
        failures++;
        $display("FAIL: a=(%0d,%0d) y=(%0d,%0d)", ar, ai, y.re, y.im);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
