// usc_forward: reversible unsigned-to-signed converter (encoder pre-processing).
//
// An unsigned n-bit sample u is re-centred on zero without any adder. The lower
// half of the range (u < 2^(n-1)) is treated the 1's complement way: the result
// is negative with magnitude (2^(n-1)-1) - u, so 0 -> -(2^(n-1)-1) and
// 2^(n-1)-1 -> -0. The upper half (u >= 2^(n-1)) is treated the 2's complement
// way: the result is positive with magnitude u - 2^(n-1), so 2^(n-1) -> +0 and
// 2^n-1 -> +(2^(n-1)-1). The two middle codes become -0 and +0, equal in value
// but distinct in code, which keeps the mapping one-to-one and so reversible
// (see usc_inverse).
//
// Circuit (as in the reference gate diagram): the sign is the inverted MSB,
// S = ~A_n, and every magnitude bit is B_k = A_k XOR ~A_n, i.e. one inverter and
// n-1 XOR gates with one inverted input; a single gate delay. For N = 3 it gives
// 000->111, 001->110, 010->101, 011->100, 100->000, 101->001, 110->010, 111->011.
//
// Interface: u_in is the unsigned sample (u_in[N-1] is A_n). s_sign is 1 for a
// negative result (including -0); s_mag is the magnitude. The output is a
// sign-magnitude code {s_sign, s_mag} of the same width N.
// Timing: purely combinational, no clock and no register.
// The gate structure and the 3-bit mapping follow the reference; the default
// N = 3 is the width of its worked example, and the port naming is this
// design's own.
module usc_forward #(
  parameter int unsigned N = 3  // bits per sample, N >= 2
) (
  input  logic [N-1:0] u_in,
  output logic         s_sign,
  output logic [N-2:0] s_mag
);

  initial begin
    assert (N >= 2) else $fatal(1, "usc_forward: N must be at least 2");
  end

  logic msb_n;  // ~A_n, shared by the NOT gate and every XOR's inverted input

  always_comb msb_n = ~u_in[N-1];

  assign s_sign = msb_n;

  // One XOR per magnitude bit: B_k = ~A_n ^ A_k.
  for (genvar k = 0; k < N - 1; k++) begin : g_xor
    assign s_mag[k] = msb_n ^ u_in[k];
  end

endmodule
