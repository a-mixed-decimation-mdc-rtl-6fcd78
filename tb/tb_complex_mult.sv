// tb_complex_mult: self-checking test of the twiddle multiplier.
//
// Multiplies random samples by random Q2.14 twiddles (and by the exact
// values 1, -1, j and -j) and compares with the product formed in 64-bit
// integers, shifted right by 14 (bits 29..14 kept). A second check compares
// with the real-valued product within 1 LSB.
module tb_complex_mult;
  import fft_pkg::*;

  cplx_t a, w, p;
  int checks = 0, failures = 0;

  complex_mult dut (.a, .w, .p);

  initial begin : watchdog
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 3000; i++) begin
      longint ar, ai, wr, wi, er, ei;
      real    rr, ri;
      ar = longint'($urandom_range(65535)) - 32768;
      ai = longint'($urandom_range(65535)) - 32768;
      case (i % 8)
        0: begin wr = 16384;  wi = 0;      end
        1: begin wr = -16384; wi = 0;      end
        2: begin wr = 0;      wi = 16384;  end
        3: begin wr = 0;      wi = -16384; end
        default: begin
          wr = longint'($urandom_range(32768)) - 16384;
          wi = longint'($urandom_range(32768)) - 16384;
        end
      endcase
      a = '{re: word_t'(ar), im: word_t'(ai)};
      w = '{re: word_t'(wr), im: word_t'(wi)};
      #1;
      er = (ar * wr - ai * wi) >>> 14;
      ei = (ar * wi + ai * wr) >>> 14;
      rr = (real'(ar) * real'(wr) - real'(ai) * real'(wi)) / 16384.0;
      ri = (real'(ar) * real'(wi) + real'(ai) * real'(wr)) / 16384.0;
      checks++;
      if (p.re !== word_t'(er) || p.im !== word_t'(ei)) begin
        failures++;
        $display("FAIL: a=(%0d,%0d) w=(%0d,%0d) p=(%0d,%0d) expected (%0d,%0d)",
                 ar, ai, wr, wi, p.re, p.im, word_t'(er), word_t'(ei));
      end
      // where the result fits 16 bits it must be within 1 LSB of the exact one
      if (rr > -32767.0 && rr < 32767.0 && ri > -32767.0 && ri < 32767.0) begin
        checks++;
        if (real'(p.re) > rr + 0.001 || real'(p.re) < rr - 1.0 ||
            real'(p.im) > ri + 0.001 || real'(p.im) < ri - 1.0) begin
          failures++;
          $display("FAIL: a=(%0d,%0d) w=(%0d,%0d) p=(%0d,%0d) exact (%.2f,%.2f)",
                   ar, ai, wr, wi, p.re, p.im, rr, ri);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
