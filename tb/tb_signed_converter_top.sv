// tb_signed_converter_top: end-to-end testbench of signed_converter_top at its
// default parameters (N = 3, the width of the worked 3-bit example).
//
// For every unsigned sample u the encoder path is checked against the literal
// 3-bit conversion table, and the signed value it encodes (sign ? -mag : +mag)
// against u - 2^(N-1) for the upper half and u - (2^(N-1)-1) for the lower
// half. The code is then fed back into the decoder path, as a codec would
// deliver it, and the restored sample must equal u (reversibility). The decoder
// path is also driven on its own with every code and checked against the
// literal 3-bit inverse table.
//
// Mechanisms counted, each of which must happen at least once:
//   lower half converted the 1's complement way, upper half converted the 2's
//   complement way, -0 produced, +0 produced, -0 and +0 restored to different
//   samples, round trip identity.
// Both paths are combinational: each result is sampled 1 time unit after its
// input changes, without a clock edge. A watchdog ends a hung run.
`timescale 1ns/1ps
module tb_signed_converter_top;

  localparam int N    = 3;
  localparam int HALF = 1 << (N - 1);

  int checks   = 0;
  int failures = 0;

  logic [N-1:0] pre_u_in;
  logic         pre_s_sign;
  logic [N-2:0] pre_s_mag;
  logic         post_s_sign;
  logic [N-2:0] post_s_mag;
  logic [N-1:0] post_u_out;

  signed_converter_top dut (
    .pre_u_in   (pre_u_in),
    .pre_s_sign (pre_s_sign),
    .pre_s_mag  (pre_s_mag),
    .post_s_sign(post_s_sign),
    .post_s_mag (post_s_mag),
    .post_u_out (post_u_out)
  );

  // Conversion table (code {s,n1,n0} for u = 0..7) and inverse table
  // (unsigned value for code 0..7).
  logic [2:0] fwd_table [8] = '{3'b111, 3'b110, 3'b101, 3'b100,
                                3'b000, 3'b001, 3'b010, 3'b011};
  int         inv_table [8] = '{4, 5, 6, 7, 3, 2, 1, 0};

  int n_ones_half, n_twos_half, n_neg_zero, n_pos_zero, n_zero_split, n_round_trip;

  task automatic expect_eq(input string what, input int got, input int exp);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL %s: got %0d, expected %0d", what, got, exp);
    end
  endtask

  task automatic expect_seen(input string what, input int count);
    checks++;
    if (count == 0) begin
      failures++;
      $display("FAIL mechanism never happened: %s", what);
    end else begin
      $display("mechanism %-28s seen %0d times", what, count);
    end
  endtask

  initial begin : watchdog
    #1ms;
    failures++;
    $display("FAIL watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin : stim
    int value, exp_value;
    int restored_neg_zero, restored_pos_zero;

    {n_ones_half, n_twos_half, n_neg_zero, n_pos_zero, n_zero_split, n_round_trip} = '0;
    restored_neg_zero = -1;
    restored_pos_zero = -1;

    // Encoder path, then loop back into the decoder path.
    for (int u = 0; u < (1 << N); u++) begin
      pre_u_in = N'(u);
      #1;
      expect_eq($sformatf("table u=%0d", u), int'({pre_s_sign, pre_s_mag}), int'(fwd_table[u]));
      value     = pre_s_sign ? -int'(pre_s_mag) : int'(pre_s_mag);
      exp_value = (u < HALF) ? u - (HALF - 1) : u - HALF;
      expect_eq($sformatf("value u=%0d", u), value, exp_value);
      if (u < HALF && pre_s_sign) n_ones_half++;
      if (u >= HALF && !pre_s_sign) n_twos_half++;
      if (pre_s_sign && pre_s_mag == '0) n_neg_zero++;
      if (!pre_s_sign && pre_s_mag == '0) n_pos_zero++;

      post_s_sign = pre_s_sign;
      post_s_mag  = pre_s_mag;
      #1;
      expect_eq($sformatf("round trip u=%0d", u), int'(post_u_out), u);
      if (int'(post_u_out) == u) n_round_trip++;
      if (post_s_mag == '0) begin
        if (post_s_sign) restored_neg_zero = int'(post_u_out);
        else             restored_pos_zero = int'(post_u_out);
      end
    end
    if (restored_neg_zero >= 0 && restored_pos_zero >= 0 &&
        restored_neg_zero != restored_pos_zero) n_zero_split++;

    // Decoder path alone, every code.
    pre_u_in = '0;
    for (int c = 0; c < (1 << N); c++) begin
      {post_s_sign, post_s_mag} = N'(c);
      #1;
      expect_eq($sformatf("inverse table code=%0d", c), int'(post_u_out), inv_table[c]);
    end

    expect_seen("lower half via 1's complement", n_ones_half);
    expect_seen("upper half via 2's complement", n_twos_half);
    expect_seen("-0 produced", n_neg_zero);
    expect_seen("+0 produced", n_pos_zero);
    expect_seen("-0/+0 restored apart", n_zero_split);
    expect_seen("round trip identity", n_round_trip);

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
