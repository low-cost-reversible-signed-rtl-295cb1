// usc_inverse: signed-to-unsigned converter (decoder post-processing), the exact
// inverse of usc_forward.
//
// A sign-magnitude code {s_sign, s_mag} made by usc_forward is turned back into
// the original unsigned sample. A negative code (s_sign = 1, including -0) came
// from the lower half: u = (2^(n-1)-1) - mag. A positive code (+0 included) came
// from the upper half: u = 2^(n-1) + mag. Because -0 and +0 are distinct codes,
// every one of the 2^n codes has exactly one preimage and the round trip
// usc_inverse(usc_forward(u)) == u holds for all u.
//
// Circuit: the same cost as the forward converter, one inverter and n-1 XORs.
// The MSB is ~s_sign; each lower bit is s_mag[k] XOR s_sign (for a negative code
// this is the 1's complement of the magnitude, for a positive code the magnitude
// itself). Every input code maps into 0..2^n-1, so no clipping is needed.
//
// Interface: s_sign / s_mag as produced by usc_forward; u_out is the restored
// unsigned sample. Timing: purely combinational, no clock and no register.
// The reference gives only the function of the inverse (its 3-bit round-trip
// table); this gate-level form is this design's own, chosen as the simplest
// circuit that realises it.
module usc_inverse #(
  parameter int unsigned N = 3  // bits per sample, N >= 2
) (
  input  logic         s_sign,
  input  logic [N-2:0] s_mag,
  output logic [N-1:0] u_out
);

  initial begin
    assert (N >= 2) else $fatal(1, "usc_inverse: N must be at least 2");
  end

  always_comb begin
    u_out[N-1]   = ~s_sign;
    u_out[N-2:0] = s_mag ^ {(N - 1){s_sign}};
  end

endmodule
