// signed_converter_top: the reversible signed converter pair of an image codec.
//
// The encoder's pre-processing path (pre_*) re-centres an unsigned n-bit sample
// on zero with usc_forward, producing an n-bit sign-magnitude code in which the
// two middle samples become -0 and +0. The decoder's post-processing path
// (post_*) undoes it with usc_inverse. The codec between the two is outside this
// design, so the two paths stand side by side, each with its own ports; wiring
// pre_s_* to post_s_* gives back the original sample for every input.
//
// Interface:
//   pre_u_in                 unsigned sample into the encoder side
//   pre_s_sign, pre_s_mag    its sign-magnitude code (sign 1 = negative or -0)
//   post_s_sign, post_s_mag  a sign-magnitude code from the decoder side
//   post_u_out               the restored unsigned sample
// Timing: both paths are purely combinational, one gate level each.
// The pairing of pre- and post-processing follows the reference's description
// of an image codec; bringing both paths out as separate ports is this design's
// own choice.
module signed_converter_top #(
  parameter int unsigned N = 3  // bits per sample, N >= 2
) (
  input  logic [N-1:0] pre_u_in,
  output logic         pre_s_sign,
  output logic [N-2:0] pre_s_mag,
  input  logic         post_s_sign,
  input  logic [N-2:0] post_s_mag,
  output logic [N-1:0] post_u_out
);

  usc_forward #(.N(N)) u_forward (
    .u_in  (pre_u_in),
    .s_sign(pre_s_sign),
    .s_mag (pre_s_mag)
  );

  usc_inverse #(.N(N)) u_inverse (
    .s_sign(post_s_sign),
    .s_mag (post_s_mag),
    .u_out (post_u_out)
  );

endmodule
