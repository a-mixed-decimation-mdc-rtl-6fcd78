// tb_rotation_memory: self-checking test of the rotator coefficient memory.
//
// Instantiates the three coefficient lists of the pipeline (0 1 2 3,
// 0 2 4 6, 0 3 6 9) and, for each frame cycle t, compares the returned
// twiddle with round(16384*cos(2*pi*phi/16)) - j*round(16384*sin(...))
// evaluated with real arithmetic.
module tb_rotation_memory;
  import fft_pkg::*;

  localparam real PI = 3.14159265358979323846;

  logic [1:0] t;
  cplx_t w1, w2, w3;
  int checks = 0, failures = 0;

  rotation_memory                       dut1 (.t, .w(w1));
  rotation_memory #(.PHI('{0, 2, 4, 6})) dut2 (.t, .w(w2));
  rotation_memory #(.PHI('{0, 3, 6, 9})) dut3 (.t, .w(w3));

  initial begin : watchdog
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input cplx_t w, input int phi);
    int er, ei;
    er = $rtoi($floor(16384.0 * $cos(2.0 * PI * phi / 16.0) + 0.5));
    ei = -$rtoi($floor(16384.0 * $sin(2.0 * PI * phi / 16.0) + 0.5));
    checks++;
    if (int'(w.re) != er || int'(w.im) != ei) begin
      failures++;
      $display("FAIL: phi=%0d w=(%0d,%0d) expected (%0d,%0d)", phi, w.re, w.im, er, ei);
    end
  endtask

  initial begin
    for (int rep = 0; rep < 3; rep++)
      for (int i = 0; i < 4; i++) begin
        t = 2'(i);
        #1;
        check(w1, i);
        check(w2, 2 * i);
        check(w3, 3 * i);
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
