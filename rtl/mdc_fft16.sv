// mdc_fft16: 16-point radix-2^2 feedforward (multipath delay commutator) FFT
// that takes and returns 4 complex samples per clock cycle.
//
// A 16-point transform arrives as a frame of 4 consecutive sets. In frame
// cycle t (0..3) the input lanes carry
//   din[0] = x[t], din[1] = x[t+8], din[2] = x[t+4], din[3] = x[t+12].
// Stage 1: two radix-2 butterflies (lanes 0/1 and 2/3) pair x[n] with x[n+8];
//          lane 3 is rotated by -j; lanes 1 and 2 are then exchanged.
// Stage 2: two butterflies pair n with n+4; lanes 1, 2, 3 are rotated by
//          W16^(2t), W16^t and W16^(3t); lanes 1 and 2 are exchanged; an L=2
//          shuffle on lanes 0/1 and on lanes 2/3 regroups the samples so that
//          the next butterflies pair n with n+2.
// Stage 3: two butterflies; lanes 1 and 2 are exchanged; an L=1 shuffle on
//          each pair regroups for pairs n, n+1; lane 3 is rotated by -j.
// Stage 4: two butterflies.
// The lane crossings, buffer lengths and coefficient lists follow the
// original architecture. The output comes in bit-reversed order, like the
// input: in output frame cycle t, dout[l] = X[bitrev4(4*t + l)], i.e.
//   t=0: X0 X8 X4 X12, t=1: X2 X10 X6 X14, t=2: X1 X9 X5 X13, t=3: X3 X11 X7 X15.
//
// The input set and the output set are each registered (this design's
// choice: the original draws no registers besides the shuffle buffers). The
// first output set of a frame appears 5 cycles after its first input set is
// sampled; a new frame may start every 4 cycles, giving 4 samples per cycle.
// Arithmetic is 16-bit with wrap-around; the transform gains up to a factor of
// 16, so the caller scales the input. rst_n (synchronous, active low) clears
// control state only.
module mdc_fft16
  import fft_pkg::*;
(
  input  logic  clk,
  input  logic  rst_n,
  input  logic  in_valid,
  input  cplx_t din [4],
  output logic  out_valid,
  output logic  out_first,
  output cplx_t dout [4],
  output logic  frame_err
);

  logic [1:0] t_s2;
  logic       sel1, sel2, ov;

  mdc_ctrl u_ctrl (
    .clk, .rst_n, .in_valid,
    .t_s2, .sel1, .sel2,
    .out_valid(ov), .out_first, .frame_err
  );

  // input register
  cplx_t x [4];
  always_ff @(posedge clk) x <= din;

  // ---------------- stage 1 ----------------
  cplx_t s1 [4], s1r [4];
  r2_butterfly u_s1_bf0 (.a(x[0]), .b(x[1]), .sum(s1[0]), .dif(s1[1]));
  r2_butterfly u_s1_bf1 (.a(x[2]), .b(x[3]), .sum(s1[2]), .dif(s1[3]));
  trivial_rotator u_s1_rot (.a(s1[3]), .y(s1r[3]));
  // lanes 1 and 2 cross
  assign s1r[0] = s1[0];
  assign s1r[1] = s1[2];
  assign s1r[2] = s1[1];

  // ---------------- stage 2 ----------------
  cplx_t s2 [4], s2r [4];
  r2_butterfly u_s2_bf0 (.a(s1r[0]), .b(s1r[1]), .sum(s2[0]), .dif(s2[1]));
  r2_butterfly u_s2_bf1 (.a(s1r[2]), .b(s1r[3]), .sum(s2[2]), .dif(s2[3]));
  assign s2r[0] = s2[0];
  rotator #(.PHI('{0, 2, 4, 6})) u_s2_rot1 (.t(t_s2), .a(s2[1]), .y(s2r[1]));
  rotator #(.PHI('{0, 1, 2, 3})) u_s2_rot2 (.t(t_s2), .a(s2[2]), .y(s2r[2]));
  rotator #(.PHI('{0, 3, 6, 9})) u_s2_rot3 (.t(t_s2), .a(s2[3]), .y(s2r[3]));

  // lanes 1 and 2 cross, then L=2 shuffles on lanes 0/1 and 2/3
  cplx_t h1 [4];
  shuffle #(.L(2)) u_sh1_0 (.clk, .sel(sel1), .up_in(s2r[0]), .lo_in(s2r[2]),
                            .up_out(h1[0]), .lo_out(h1[1]));
  shuffle #(.L(2)) u_sh1_1 (.clk, .sel(sel1), .up_in(s2r[1]), .lo_in(s2r[3]),
                            .up_out(h1[2]), .lo_out(h1[3]));

  // ---------------- stage 3 ----------------
  cplx_t s3 [4];
  r2_butterfly u_s3_bf0 (.a(h1[0]), .b(h1[1]), .sum(s3[0]), .dif(s3[1]));
  r2_butterfly u_s3_bf1 (.a(h1[2]), .b(h1[3]), .sum(s3[2]), .dif(s3[3]));

  // lanes 1 and 2 cross, then L=1 shuffles, then -j on lane 3
  cplx_t h2 [4], h2r [4];
  shuffle #(.L(1)) u_sh2_0 (.clk, .sel(sel2), .up_in(s3[0]), .lo_in(s3[2]),
                            .up_out(h2[0]), .lo_out(h2[1]));
  shuffle #(.L(1)) u_sh2_1 (.clk, .sel(sel2), .up_in(s3[1]), .lo_in(s3[3]),
                            .up_out(h2[2]), .lo_out(h2[3]));
  assign h2r[0] = h2[0];
  assign h2r[1] = h2[1];
  assign h2r[2] = h2[2];
  trivial_rotator u_s3_rot (.a(h2[3]), .y(h2r[3]));

  // ---------------- stage 4 ----------------
  cplx_t s4 [4];
  r2_butterfly u_s4_bf0 (.a(h2r[0]), .b(h2r[1]), .sum(s4[0]), .dif(s4[1]));
  r2_butterfly u_s4_bf1 (.a(h2r[2]), .b(h2r[3]), .sum(s4[2]), .dif(s4[3]));

  // output register
  always_ff @(posedge clk) dout <= s4;
  assign out_valid = ov;

endmodule
