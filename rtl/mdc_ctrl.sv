// mdc_ctrl: control of the 16-point 4-parallel feedforward FFT pipeline.
//
// A 2-bit counter numbers the valid input cycles of each 4-cycle frame. The
// (valid, frame cycle) tag of the registered input set is then delayed along
// with the data, so each part of the pipeline sees the frame cycle of the
// samples it is processing:
//   t_s2  frame cycle in stages 1 and 2 (addresses the rotation memories)
//   sel1  bit 1 of the frame cycle entering the L=2 shuffle (commutes every 2)
//   sel2  bit 0 of the frame cycle entering the L=1 shuffle (commutes every 1)
// Deriving the multiplexer controls from counter bits follows the original
// architecture. Carrying a valid tag, and holding both selects at 0 while no
// frame passes, is this design's choice: it lets frames be separated by idle
// cycles and lets the last frame drain without further input.
//
// Interface and timing: in_valid is sampled on the rising edge together with
// the input set (the datapath registers the set on the same edge). A frame is
// 4 consecutive valid cycles; in_valid falling inside a frame sets the sticky
// frame_err flag. out_valid/out_first describe the datapath's output register,
// 5 cycles after the matching input cycle. rst_n is synchronous, active low.
module mdc_ctrl (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       in_valid,
  output logic [1:0] t_s2,
  output logic       sel1,
  output logic       sel2,
  output logic       out_valid,
  output logic       out_first,
  output logic       frame_err
);

  logic [1:0] cnt;                       // frame cycle of the next input set
  logic       v_s2;                      // tag of stages 1-2
  logic       v_s3a, v_s3, v_s4;         // tags after the L=2 and L=1 shuffles
  logic [1:0] t_s3a, t_s3, t_s4;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      cnt       <= '0;
      v_s2      <= 1'b0;
      v_s3a     <= 1'b0;
      v_s3      <= 1'b0;
      v_s4      <= 1'b0;
      t_s2      <= '0;
      t_s3a     <= '0;
      t_s3      <= '0;
      t_s4      <= '0;
      out_valid <= 1'b0;
      out_first <= 1'b0;
      frame_err <= 1'b0;
    end else begin
      if (in_valid) cnt <= cnt + 2'd1;
      if (!in_valid && cnt != 2'd0) frame_err <= 1'b1;
      // input register stage
      v_s2  <= in_valid;
      t_s2  <= cnt;
      // the L=2 shuffle delays a frame by two cycles
      v_s3a <= v_s2;
      t_s3a <= t_s2;
      v_s3  <= v_s3a;
      t_s3  <= t_s3a;
      // the L=1 shuffle delays a frame by one cycle
      v_s4  <= v_s3;
      t_s4  <= t_s3;
      // output register stage
      out_valid <= v_s4;
      out_first <= v_s4 && (t_s4 == 2'd0);
    end
  end

  assign sel1 = v_s2 & t_s2[1];
  assign sel2 = v_s3 & t_s3[0];

endmodule
