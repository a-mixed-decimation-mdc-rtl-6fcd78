// tb_r2_butterfly: self-checking test of the radix-2 butterfly.
//
// Applies random complex pairs, including full-range values that overflow,
// and compares sum and dif with a+b and a-b computed in 32-bit integers and
// wrapped to 16 bits.
module tb_r2_butterfly;
  import fft_pkg::*;

  cplx_t a, b, sum, dif;
  int checks = 0, failures = 0;

  r2_butterfly dut (.a, .b, .sum, .dif);

  initial begin : watchdog
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic word_t wrap(input int v);
    return word_t'(v);
  endfunction

  initial begin
    for (int i = 0; i < 2000; i++) begin
      int ar, ai, br, bi;
      ar = int'($urandom_range(65535)) - 32768;
      ai = int'($urandom_range(65535)) - 32768;
      br = (i < 1000) ? int'($urandom_range(2000)) - 1000 : int'($urandom_range(65535)) - 32768;
      bi = int'($urandom_range(65535)) - 32768;
      if (i < 1000) begin ar = ar / 40; ai = ai / 40; bi = bi / 40; end
      a = '{re: word_t'(ar), im: word_t'(ai)};
      b = '{re: word_t'(br), im: word_t'(bi)};
      #1;
      checks++;
      if (sum.re !== wrap(ar + br) || sum.im !== wrap(ai + bi) ||
          dif.re !== wrap(ar - br) || dif.im !== wrap(ai - bi)) begin
        failures++;
        $display("FAIL: a=(%0d,%0d) b=(%0d,%0d) sum=(%0d,%0d) dif=(%0d,%0d)",
                 ar, ai, br, bi, sum.re, sum.im, dif.re, dif.im);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
