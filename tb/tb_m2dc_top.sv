// tb_m2dc_top: end-to-end test of m2dc_top at its default sizes.
//
// Pipeline: streams 16-point frames through the 4-parallel pipeline, with
// back-to-back runs and idle gaps, and checks every output sample against a
// double-precision DFT (bit-reversed frame order), the 5-cycle latency and
// one output frame per 4 cycles for back-to-back input.
// Mixed decimation: while the pipeline runs, the same frames are applied to
// the 16-point transform (and their first half to the 8-point one), whose
// outputs must match the DFT in natural order.
// Mechanisms counted, each of which must happen at least once: frames sent
// back to back, frames after an idle gap, shuffle multiplexers in the
// crossing position (L=2 and L=1), the last frame draining with no input,
// a frame cut short raising frame_err, 16-point and 8-point combinational
// transforms. A watchdog ends a hung run as failed.
module tb_m2dc_top;
  import fft_pkg::*;
  import tb_fft_pkg::*;

  localparam int  NFRAMES = 48;
  localparam int  AMP     = 1000;
  localparam real TOL     = 10.0;
  localparam int  LAT     = 5;

  logic  clk = 1'b0;
  logic  rst_n;
  logic  mdc_in_valid, mdc_out_valid, mdc_out_first, mdc_frame_err;
  cplx_t mdc_din [4], mdc_dout [4];
  cplx_t md16_x [16], md16_y [16];
  cplx_t md8_x [8], md8_y [8];

  m2dc_top dut (.*);

  int checks = 0, failures = 0;
  int cycle = 0;
  int n_b2b = 0, n_gap = 0, n_cross1 = 0, n_cross2 = 0, n_drain = 0;
  int n_ferr = 0, n_md16 = 0, n_md8 = 0;

  always #5 clk = ~clk;
  always @(posedge clk) cycle <= cycle + 1;

  initial begin : watchdog
    repeat (10000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  cplx_t frames [NFRAMES][16];
  int    start_cycle [NFRAMES];
  int    out_cycle   [NFRAMES];
  bit    after_gap   [NFRAMES];
  int    nout = 0, tout = 0;
  bit    input_done = 1'b0;

  // pipeline output monitor and multiplexer probes
  always @(posedge clk) begin
    #1;
    if (dut.u_mdc.sel1) n_cross1++;
    if (dut.u_mdc.sel2) n_cross2++;
    if (rst_n && mdc_out_valid && nout < NFRAMES) begin
      if (mdc_out_first) begin
        tout = 0;
        out_cycle[nout] = cycle;
      end
      if (input_done) n_drain++;
      for (int l = 0; l < 4; l++) begin
        int     k;
        rcplx_t r;
        k = bitrev(4 * tout + l, 4);
        r = dft(frames[nout], 16, k);
        check(cdist(mdc_dout[l], r) <= TOL,
              $sformatf("pipeline frame %0d X[%0d] = (%0d, %0d), expected (%.1f, %.1f)",
                        nout, k, mdc_dout[l].re, mdc_dout[l].im, r.re, r.im));
      end
      if (tout == 3) nout++;
      tout++;
    end
  end

  // combinational transforms of frame f
  task automatic check_md(input int f);
    cplx_t half [16];
    for (int n = 0; n < 16; n++) md16_x[n] = frames[f][n];
    for (int n = 0; n < 8; n++)  md8_x[n]  = frames[f][n];
    for (int n = 0; n < 16; n++) half[n]   = (n < 8) ? frames[f][n] : '0;
    #1;
    for (int k = 0; k < 16; k++) begin
      rcplx_t r;
      r = dft(frames[f], 16, k);
      check(cdist(md16_y[k], r) <= TOL,
            $sformatf("md16 frame %0d X[%0d] = (%0d, %0d), expected (%.1f, %.1f)",
                      f, k, md16_y[k].re, md16_y[k].im, r.re, r.im));
    end
    n_md16++;
    for (int k = 0; k < 8; k++) begin
      rcplx_t r;
      r = dft(half, 8, k);
      check(cdist(md8_y[k], r) <= TOL,
            $sformatf("md8 frame %0d X[%0d] = (%0d, %0d), expected (%.1f, %.1f)",
                      f, k, md8_y[k].re, md8_y[k].im, r.re, r.im));
    end
    n_md8++;
  endtask

  initial begin
    rst_n = 1'b0;
    mdc_in_valid = 1'b0;
    for (int l = 0; l < 4; l++) mdc_din[l] = '0;
    for (int n = 0; n < 16; n++) md16_x[n] = '0;
    for (int n = 0; n < 8; n++)  md8_x[n]  = '0;
    for (int f = 0; f < NFRAMES; f++)
      for (int n = 0; n < 16; n++)
        frames[f][n] = (f == 0) ? ((n == 0) ? '{re: 16'sd1000, im: 16'sd0} : '0)
                                : rand_sample(AMP);
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    for (int f = 0; f < NFRAMES; f++) begin
      int gap;
      gap = (f % 8 == 3) ? 1 + f % 3 : 0;
      after_gap[f] = (gap > 0);
      repeat (gap) begin
        @(negedge clk);
        mdc_in_valid = 1'b0;
      end
      for (int t = 0; t < 4; t++) begin
        @(negedge clk);
        if (t == 0) start_cycle[f] = cycle;
        mdc_in_valid = 1'b1;
        mdc_din[0] = frames[f][t];
        mdc_din[1] = frames[f][t+8];
        mdc_din[2] = frames[f][t+4];
        mdc_din[3] = frames[f][t+12];
      end
      check_md(f);
    end
    @(negedge clk);
    mdc_in_valid = 1'b0;
    input_done = 1'b1;
    repeat (12) @(negedge clk);
    check(nout == NFRAMES, $sformatf("%0d of %0d pipeline frames came out", nout, NFRAMES));
    for (int f = 0; f < NFRAMES; f++)
      check(out_cycle[f] - start_cycle[f] == LAT,
            $sformatf("frame %0d latency %0d cycles", f, out_cycle[f] - start_cycle[f]));
    for (int f = 1; f < NFRAMES; f++) begin
      if (after_gap[f]) n_gap++;
      else begin
        n_b2b++;
        check(out_cycle[f] - out_cycle[f-1] == 4,
              $sformatf("frame %0d leaves %0d cycles after the previous", f,
                        out_cycle[f] - out_cycle[f-1]));
      end
    end
    check(!mdc_frame_err, "frame_err stays low for whole frames");
    // a frame cut short
    @(negedge clk); mdc_in_valid = 1'b1;
    @(negedge clk); mdc_in_valid = 1'b0;
    @(negedge clk);
    @(negedge clk);
    if (mdc_frame_err) n_ferr++;
    $display("mechanisms: back-to-back %0d, after gap %0d, L=2 cross %0d, L=1 cross %0d, drain %0d, frame_err %0d, md16 %0d, md8 %0d",
             n_b2b, n_gap, n_cross1, n_cross2, n_drain, n_ferr, n_md16, n_md8);
    check(n_b2b > 0,    "back-to-back frames happened");
    check(n_gap > 0,    "frames after a gap happened");
    check(n_cross1 > 0, "L=2 shuffle crossed");
    check(n_cross2 > 0, "L=1 shuffle crossed");
    check(n_drain > 0,  "last frame drained");
    check(n_ferr > 0,   "frame error detected");
    check(n_md16 > 0,   "16-point mixed-decimation transform ran");
    check(n_md8 > 0,    "8-point mixed-decimation transform ran");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
