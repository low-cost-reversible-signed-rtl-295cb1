// tb_usc_inverse: self-checking testbench for usc_inverse.
//
// 1. At the default width (N = 3) every code is checked against the literal
//    3-bit inverse table: code 111 -> 000, 110 -> 001, ..., 100 -> 011 (the
//    -0 code), 000 -> 100 (the +0 code), ..., 011 -> 111.
// 2. At N = 2, 8 and 12 every code is checked against the arithmetic
//    definition: negative codes give half-1-mag, positive codes half+mag.
// 3. At N = 8 the map is checked to be onto: every unsigned value 0..255 is
//    produced by exactly one code, so -0 and +0 restore different samples.
// The inverse is combinational: outputs are sampled 1 time unit after the
// input changes, with no clock edge between. A watchdog ends a hung run.
`timescale 1ns/1ps
module tb_usc_inverse;

  int checks   = 0;
  int failures = 0;

  logic        s3;
  logic [1:0]  m3;
  logic [2:0]  u3;
  usc_inverse dut3 (.s_sign(s3), .s_mag(m3), .u_out(u3));

  logic        s2;
  logic [0:0]  m2;
  logic [1:0]  u2;
  usc_inverse #(.N(2)) dut2 (.s_sign(s2), .s_mag(m2), .u_out(u2));

  logic        s8;
  logic [6:0]  m8;
  logic [7:0]  u8;
  usc_inverse #(.N(8)) dut8 (.s_sign(s8), .s_mag(m8), .u_out(u8));

  logic        s12;
  logic [10:0] m12;
  logic [11:0] u12;
  usc_inverse #(.N(12)) dut12 (.s_sign(s12), .s_mag(m12), .u_out(u12));

  // Expected unsigned value for each 3-bit code {s, n1, n0} = 0..7.
  int inv3 [8] = '{4, 5, 6, 7, 3, 2, 1, 0};

  task automatic check(input string what, input int code, input int got, input int exp);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL %s code=%0d: got %0d, expected %0d", what, code, got, exp);
    end
  endtask

  function automatic int ref_inv(input int n, input int s, input int m);
    int half = 1 << (n - 1);
    return (s != 0) ? (half - 1 - m) : (half + m);
  endfunction

  initial begin : watchdog
    #1ms;
    failures++;
    $display("FAIL watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin : stim
    bit seen8 [256];

    for (int c = 0; c < 8; c++) begin
      {s3, m3} = 3'(c);
      #1;
      check("table3", c, int'(u3), inv3[c]);
    end

    for (int c = 0; c < 4; c++) begin
      {s2, m2} = 2'(c);
      #1;
      check("n2", c, int'(u2), ref_inv(2, c >> 1, c & 1));
    end
    for (int c = 0; c < 256; c++) begin
      {s8, m8} = 8'(c);
      #1;
      check("n8", c, int'(u8), ref_inv(8, c >> 7, c & 127));
      checks++;
      if (seen8[u8]) begin
        failures++;
        $display("FAIL n8 value %0d restored twice (code=%0d)", u8, c);
      end
      seen8[u8] = 1'b1;
    end
    for (int c = 0; c < 4096; c++) begin
      {s12, m12} = 12'(c);
      #1;
      check("n12", c, int'(u12), ref_inv(12, c >> 11, c & 2047));
    end

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
