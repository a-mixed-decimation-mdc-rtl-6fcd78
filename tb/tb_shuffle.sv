// tb_shuffle: self-checking test of the delay commutator.
//
// Two instances, L = 2 (default) and L = 1, receive continuous frames of 2L
// cycles: the upper input carries blocks A then B, the lower input C then D,
// with sel = 0 for the first L cycles and 1 for the next L. Each sample is
// tagged with its frame, lane and position. L cycles after a frame starts,
// the upper output must deliver A then C and the lower output B then D.
module tb_shuffle;
  import fft_pkg::*;

  localparam int NFR = 30;

  logic clk = 1'b0;
  logic sel2, sel1;
  cplx_t up2, lo2, uo2, lo_o2;
  cplx_t up1, lo1, uo1, lo_o1;
  int checks = 0, failures = 0;

  shuffle          dut2 (.clk, .sel(sel2), .up_in(up2), .lo_in(lo2), .up_out(uo2), .lo_out(lo_o2));
  shuffle #(.L(1)) dut1 (.clk, .sel(sel1), .up_in(up1), .lo_in(lo1), .up_out(uo1), .lo_out(lo_o1));

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (2000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // sample tag: frame*100 + lane*50 + position; lane 0 = upper, 1 = lower
  function automatic cplx_t tag(input int f, input int lane, input int pos);
    return '{re: word_t'(f * 100 + lane * 50 + pos), im: word_t'(-(f * 100 + lane * 50 + pos))};
  endfunction

  task automatic expect_eq(input cplx_t got, input cplx_t exp, input string what);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL: %s got %0d expected %0d", what, got.re, exp.re);
    end
  endtask

  // run one instance's stream for frame size 2L and check its outputs
  initial begin
    // L = 2: cycle c belongs to frame c/4, position c%4
    // L = 1: cycle c belongs to frame c/2, position c%2
    for (int c = 0; c < 4 * NFR; c++) begin
      @(negedge clk);
      // drive
      up2  = tag(c / 4, 0, c % 4);
      lo2  = tag(c / 4, 1, c % 4);
      sel2 = (c % 4) >= 2;
      up1  = tag(c / 2, 0, c % 2);
      lo1  = tag(c / 2, 1, c % 2);
      sel1 = (c % 2) >= 1;
      #1;
      // check outputs of the frame that started L cycles ago
      if (c >= 2) begin
        int f, i;
        f = (c - 2) / 4;
        i = (c - 2) % 4;
        expect_eq(uo2,   (i < 2) ? tag(f, 0, i) : tag(f, 1, i - 2), "L=2 upper");
        expect_eq(lo_o2, (i < 2) ? tag(f, 0, i + 2) : tag(f, 1, i), "L=2 lower");
      end
      if (c >= 1) begin
        int f, i;
        f = (c - 1) / 2;
        i = (c - 1) % 2;
        expect_eq(uo1,   (i < 1) ? tag(f, 0, i) : tag(f, 1, i - 1), "L=1 upper");
        expect_eq(lo_o1, (i < 1) ? tag(f, 0, i + 1) : tag(f, 1, i), "L=1 lower");
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
