// tb_signed_converter_widths: signed_converter_top at sample widths other than
// the default, with the encoder output looped into the decoder input.
//
// At N = 8 and N = 16 every unsigned sample is converted, its signed value is
// checked against u - 2^(N-1) (upper half) or u - (2^(N-1)-1) (lower half),
// and the decoder must restore u exactly. The run also checks that the signed
// values are symmetric about zero: the sum over all samples is 0 and the
// extremes are -(2^(N-1)-1) and +(2^(N-1)-1). Paths are combinational and are
// sampled 1 time unit after each change. A watchdog ends a hung run.
`timescale 1ns/1ps
module tb_signed_converter_widths;

  int checks   = 0;
  int failures = 0;

  logic [7:0]  u8,  r8;
  logic        s8;
  logic [6:0]  m8;
  signed_converter_top #(.N(8)) dut8 (
    .pre_u_in(u8), .pre_s_sign(s8), .pre_s_mag(m8),
    .post_s_sign(s8), .post_s_mag(m8), .post_u_out(r8));

  logic [15:0] u16, r16;
  logic        s16;
  logic [14:0] m16;
  signed_converter_top #(.N(16)) dut16 (
    .pre_u_in(u16), .pre_s_sign(s16), .pre_s_mag(m16),
    .post_s_sign(s16), .post_s_mag(m16), .post_u_out(r16));

  task automatic expect_eq(input string what, input int got, input int exp);
    checks++;
    if (got != exp) begin
      failures++;
      if (failures < 20) $display("FAIL %s: got %0d, expected %0d", what, got, exp);
    end
  endtask

  function automatic int ref_value(input int n, input int u);
    int half = 1 << (n - 1);
    return (u < half) ? u - (half - 1) : u - half;
  endfunction

  initial begin : watchdog
    #10ms;
    failures++;
    $display("FAIL watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin : stim
    longint sum;
    int v, vmin, vmax;

    sum = 0; vmin = 0; vmax = 0;
    for (int u = 0; u < 256; u++) begin
      u8 = 8'(u);
      #1;
      v = s8 ? -int'(m8) : int'(m8);
      expect_eq($sformatf("n8 value u=%0d", u), v, ref_value(8, u));
      expect_eq($sformatf("n8 round trip u=%0d", u), int'(r8), u);
      sum += v;
      if (v < vmin) vmin = v;
      if (v > vmax) vmax = v;
    end
    expect_eq("n8 sum", int'(sum), 0);
    expect_eq("n8 min", vmin, -127);
    expect_eq("n8 max", vmax, 127);

    sum = 0; vmin = 0; vmax = 0;
    for (int u = 0; u < 65536; u++) begin
      u16 = 16'(u);
      #1;
      v = s16 ? -int'(m16) : int'(m16);
      expect_eq($sformatf("n16 value u=%0d", u), v, ref_value(16, u));
      expect_eq($sformatf("n16 round trip u=%0d", u), int'(r16), u);
      sum += v;
      if (v < vmin) vmin = v;
      if (v > vmax) vmax = v;
    end
    expect_eq("n16 sum", int'(sum), 0);
    expect_eq("n16 min", vmin, -32767);
    expect_eq("n16 max", vmax, 32767);

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
