// tb_mdc_fft16: self-checking test of the 16-point 4-parallel pipelined FFT.
//
// Streams frames of random, impulse and constant 16-point inputs into
// mdc_fft16, in the lane order the pipeline expects (lane l in frame cycle t
// carries x[t + 8*l[0] + 4*l[1]]), partly back to back and partly separated
// by idle cycles. Every output sample is compared with a double-precision
// DFT of its frame at the bit-reversed position X[bitrev4(4t+l)], within
// TOL LSBs. It also checks the 5-cycle latency from a frame's first input set
// to its out_first flag, that back-to-back frames leave back to back (one
// frame per 4 cycles), and that dropping in_valid inside a frame raises
// frame_err. A watchdog ends the run as failed if it hangs.
module tb_mdc_fft16;
  import fft_pkg::*;
  import tb_fft_pkg::*;

  localparam int  NFRAMES = 40;
  localparam int  AMP     = 1000;
  localparam real TOL     = 10.0;
  localparam int  LAT     = 5;

  logic  clk = 1'b0;
  logic  rst_n;
  logic  in_valid;
  cplx_t din [4];
  logic  out_valid, out_first, frame_err;
  cplx_t dout [4];

  int checks = 0, failures = 0;
  int cycle = 0;
  real maxerr = 0.0;

  mdc_fft16 dut (.clk, .rst_n, .in_valid, .din, .out_valid, .out_first,
                 .dout, .frame_err);

  always #5 clk = ~clk;
  always @(posedge clk) cycle <= cycle + 1;

  initial begin : watchdog
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  cplx_t frames [NFRAMES][16];
  int    start_cycle [NFRAMES];
  int    out_cycle   [NFRAMES];
  int    nout = 0;        // frames seen at the output
  int    tout = 0;        // cycle of the current output frame

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  // output monitor: sampled just after each rising edge
  always @(posedge clk) begin
    #1;
    if (rst_n && out_valid && nout < NFRAMES) begin
      if (out_first) begin
        tout = 0;
        out_cycle[nout] = cycle;
      end
      for (int l = 0; l < 4; l++) begin
        int     k;
        rcplx_t r;
        real    e;
        k = bitrev(4 * tout + l, 4);
        r = dft(frames[nout], 16, k);
        e = cdist(dout[l], r);
        if (e > maxerr) maxerr = e;
        check(e <= TOL, $sformatf("frame %0d X[%0d] = (%0d, %0d), expected (%.1f, %.1f)",
                                  nout, k, dout[l].re, dout[l].im, r.re, r.im));
      end
      if (tout == 3) nout++;
      tout++;
    end
  end

  initial begin
    rst_n    = 1'b0;
    in_valid = 1'b0;
    for (int l = 0; l < 4; l++) din[l] = '0;
    // test vectors: impulse, delayed impulse, constant, full-scale tone, random
    for (int f = 0; f < NFRAMES; f++)
      for (int n = 0; n < 16; n++) begin
        case (f)
          0: frames[f][n] = (n == 0) ? '{re: 16'sd1000, im: 16'sd0} : '0;
          1: frames[f][n] = (n == 3) ? '{re: 16'sd0, im: 16'sd1500} : '0;
          2: frames[f][n] = '{re: 16'sd700, im: -16'sd300};
          3: frames[f][n] = '{re: word_t'($rtoi(1400.0 * $cos(2.0 * PI * 5 * n / 16))),
                              im: word_t'($rtoi(1400.0 * $sin(2.0 * PI * 5 * n / 16)))};
          default: frames[f][n] = rand_sample(AMP);
        endcase
      end
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    for (int f = 0; f < NFRAMES; f++) begin
      // idle gaps between some frames; frames 10..29 back to back
      if (f < 10 || f > 30)
        repeat (f % 3) begin
          @(negedge clk);
          in_valid = 1'b0;
        end
      for (int t = 0; t < 4; t++) begin
        @(negedge clk);
        if (t == 0) start_cycle[f] = cycle;
        in_valid = 1'b1;
        din[0] = frames[f][t];
        din[1] = frames[f][t+8];
        din[2] = frames[f][t+4];
        din[3] = frames[f][t+12];
      end
    end
    @(negedge clk);
    in_valid = 1'b0;
    repeat (12) @(negedge clk);
    check(nout == NFRAMES, $sformatf("%0d of %0d frames came out", nout, NFRAMES));
    for (int f = 0; f < NFRAMES; f++)
      check(out_cycle[f] - start_cycle[f] == LAT,
            $sformatf("frame %0d latency %0d cycles", f, out_cycle[f] - start_cycle[f]));
    for (int f = 11; f < 30; f++)
      check(out_cycle[f] - out_cycle[f-1] == 4,
            $sformatf("frame %0d follows %0d cycles after the previous", f,
                      out_cycle[f] - out_cycle[f-1]));
    check(!frame_err, "frame_err set by whole frames");
    // a frame cut short must raise frame_err
    @(negedge clk); in_valid = 1'b1;
    @(negedge clk); in_valid = 1'b1;
    @(negedge clk); in_valid = 1'b0;
    @(negedge clk);
    @(negedge clk);
    check(frame_err, "frame_err after a frame cut short");
    $display("max error %.2f LSB", maxerr);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
