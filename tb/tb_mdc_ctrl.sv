// tb_mdc_ctrl: self-checking test of the pipeline control.
//
// Drives in_valid with whole 4-cycle frames, back to back and with idle
// gaps, keeps its own record of each cycle's (valid, frame cycle) input tag,
// and checks every cycle that
//   t_s2 and sel1 follow the tag of 1 cycle before (sel1 = bit 1),
//   sel2 follows bit 0 of the tag of 3 cycles before,
//   out_valid / out_first follow the tag of 5 cycles before,
// then checks that a frame cut short sets frame_err and that reset clears it.
module tb_mdc_ctrl;

  logic       clk = 1'b0;
  logic       rst_n, in_valid;
  logic [1:0] t_s2;
  logic       sel1, sel2, out_valid, out_first, frame_err;
  int checks = 0, failures = 0;

  mdc_ctrl dut (.clk, .rst_n, .in_valid, .t_s2, .sel1, .sel2, .out_valid,
                .out_first, .frame_err);

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (3000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  bit v_hist [$];      // valid of the input sampled at each edge
  int p_hist [$];      // its frame cycle
  int pos = 0;
  bit stream_checks = 1'b1;   // the record-based checks run until the error test

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  // record the input tag at each edge, then check outputs after it
  always @(posedge clk) begin
    if (rst_n && stream_checks) begin
      v_hist.push_front(in_valid);
      p_hist.push_front(pos);
      if (in_valid) pos = (pos + 1) % 4;
      #1;
      if (v_hist.size() > 5) begin
        check(sel1 == (v_hist[0] && p_hist[0] >= 2), "sel1");
        if (v_hist[0]) check(t_s2 == 2'(p_hist[0]), "t_s2");
        check(sel2 == (v_hist[2] && (p_hist[2] % 2) == 1), "sel2");
        check(out_valid == v_hist[4], "out_valid");
        check(out_first == (v_hist[4] && p_hist[4] == 0), "out_first");
        check(!frame_err, "no frame_err for whole frames");
      end
    end
  end

  initial begin
    rst_n = 1'b0;
    in_valid = 1'b0;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    for (int f = 0; f < 60; f++) begin
      repeat ((f % 5 == 0) ? (f % 3) : 0) begin
        @(negedge clk);
        in_valid = 1'b0;
      end
      repeat (4) begin
        @(negedge clk);
        in_valid = 1'b1;
      end
    end
    @(negedge clk);
    in_valid = 1'b0;
    repeat (8) @(negedge clk);
    // cut a frame short: stop the record-based checks first
    stream_checks = 1'b0;
    rst_n = 1'b0;
    @(negedge clk);
    rst_n = 1'b1;
    in_valid = 1'b1;
    @(negedge clk);
    in_valid = 1'b0;
    @(negedge clk);
    @(negedge clk);
    check(frame_err, "frame_err after a frame cut short");
    rst_n = 1'b0;
    @(negedge clk);
    check(!frame_err, "reset clears frame_err");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
