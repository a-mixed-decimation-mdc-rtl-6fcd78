// shuffle: delay commutator that reorders data between two lanes of the
// pipelined FFT.
//
// A buffer of L registers delays the lower input; two multiplexers choose
// between the undelayed upper input and the delayed lower input; a second
// buffer of L registers delays the upper output. With the upper lane carrying
// blocks A then B and the lower lane C then D (L samples each), sel = 0 for
// the first L cycles and 1 for the next L cycles gives A then C on the upper
// output and B then D on the lower output: B and C are interchanged and both
// outputs are aligned L cycles after the inputs. This buffer placement and the
// select timing follow the original architecture; which multiplexer input is
// 0 (pass) and which is 1 (cross) is this design's choice.
//
// Timing: buffers shift on every rising clock edge; sel is combinational. The
// data buffers are not reset, so their outputs mean nothing until L cycles of
// data have passed (valid tags travel outside this block).
module shuffle
  import fft_pkg::*;
#(
  parameter int L = 2
) (
  input  logic  clk,
  input  logic  sel,
  input  cplx_t up_in,
  input  cplx_t lo_in,
  output cplx_t up_out,
  output cplx_t lo_out
);

  if (L < 1) begin : g_bad_l
    $error("shuffle: L must be at least 1");
  end

  cplx_t in_buf  [L];   // input buffer on the lower lane
  cplx_t out_buf [L];   // output buffer on the upper lane
  cplx_t lo_d, up_mux;

  assign lo_d   = in_buf[L-1];
  assign up_mux = sel ? lo_d : up_in;
  assign lo_out = sel ? up_in : lo_d;
  assign up_out = out_buf[L-1];

  always_ff @(posedge clk) begin
    in_buf[0]  <= lo_in;
    out_buf[0] <= up_mux;
    for (int i = 1; i < L; i++) begin
      in_buf[i]  <= in_buf[i-1];
      out_buf[i] <= out_buf[i-1];
    end
  end

endmodule
