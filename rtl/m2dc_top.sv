// m2dc_top: the 16-point FFT designs side by side.
//
//  * mdc_*  : the 16-point radix-2^2 feedforward pipeline (mdc_fft16), 4
//             samples per clock cycle in and out, bit-reversed frame order,
//             5 cycles from a frame's first input set to its first output set.
//  * md16_* : the combinational 16-point mixed-decimation FFT (md_fft, N=16),
//             natural-order input and output.
//  * md8_*  : the same scheme for 8 points (md_fft, N=8).
// The three datapaths share no logic; clk and rst_n serve the pipeline only.
// Keeping them separate is this design's choice: the mixed-decimation flow
// graph and the 4-parallel pipeline are described as one proposal, but no
// merged architecture is given, and the pipeline's order follows its own
// architecture. See mdc_fft16 and md_fft for data order and timing.
module m2dc_top
  import fft_pkg::*;
(
  input  logic  clk,
  input  logic  rst_n,
  // 4-parallel pipelined FFT
  input  logic  mdc_in_valid,
  input  cplx_t mdc_din [4],
  output logic  mdc_out_valid,
  output logic  mdc_out_first,
  output cplx_t mdc_dout [4],
  output logic  mdc_frame_err,
  // 16-point mixed-decimation FFT
  input  cplx_t md16_x [16],
  output cplx_t md16_y [16],
  // 8-point mixed-decimation FFT
  input  cplx_t md8_x [8],
  output cplx_t md8_y [8]
);

  mdc_fft16 u_mdc (
    .clk, .rst_n,
    .in_valid (mdc_in_valid),
    .din      (mdc_din),
    .out_valid(mdc_out_valid),
    .out_first(mdc_out_first),
    .dout     (mdc_dout),
    .frame_err(mdc_frame_err)
  );

  md_fft #(.N(16)) u_md16 (.x(md16_x), .y(md16_y));
  md_fft #(.N(8))  u_md8  (.x(md8_x),  .y(md8_y));

endmodule
