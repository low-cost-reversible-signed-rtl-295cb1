// tb_usc_forward: self-checking testbench for usc_forward.
//
// 1. At the default width (N = 3) every input is checked against the 3-bit
//    mapping table written out literally (000->111 ... 111->011).
// 2. At N = 2, 8 and 12 every input is checked against the arithmetic
//    definition: below half = 2^(N-1) the result is negative with magnitude
//    half-1-u, otherwise positive with magnitude u-half.
// 3. At N = 8 the map is checked to be one-to-one (each of the 256 codes is
//    produced exactly once), which is what makes the conversion reversible.
// The converter is combinational, so outputs are sampled 1 time unit after the
// input changes, with no clock edge between: a zero-cycle latency check.
// A watchdog ends the run with a failure if it does not finish in time.
`timescale 1ns/1ps
module tb_usc_forward;

  int checks   = 0;
  int failures = 0;

  // N = 3 (default parameter)
  logic [2:0]  u3;
  logic        s3;
  logic [1:0]  m3;
  usc_forward dut3 (.u_in(u3), .s_sign(s3), .s_mag(m3));

  // N = 2
  logic [1:0]  u2;
  logic        s2;
  logic [0:0]  m2;
  usc_forward #(.N(2)) dut2 (.u_in(u2), .s_sign(s2), .s_mag(m2));

  // N = 8
  logic [7:0]  u8;
  logic        s8;
  logic [6:0]  m8;
  usc_forward #(.N(8)) dut8 (.u_in(u8), .s_sign(s8), .s_mag(m8));

  // N = 12
  logic [11:0] u12;
  logic        s12;
  logic [10:0] m12;
  usc_forward #(.N(12)) dut12 (.u_in(u12), .s_sign(s12), .s_mag(m12));

  // Expected 3-bit codes {s, n1, n0} for u = 0..7.
  logic [2:0] table3 [8] = '{3'b111, 3'b110, 3'b101, 3'b100,
                             3'b000, 3'b001, 3'b010, 3'b011};

  task automatic check(input string what, input int u, input int got_s, input int got_m,
                       input int exp_s, input int exp_m);
    checks++;
    if (got_s != exp_s || got_m != exp_m) begin
      failures++;
      $display("FAIL %s u=%0d: got sign=%0d mag=%0d, expected sign=%0d mag=%0d",
               what, u, got_s, got_m, exp_s, exp_m);
    end
  endtask

  // Reference for width n: returns sign and magnitude arithmetically.
  function automatic void ref_conv(input int n, input int u, output int s, output int m);
    int half = 1 << (n - 1);
    if (u < half) begin s = 1; m = half - 1 - u; end
    else          begin s = 0; m = u - half;     end
  endfunction

  initial begin : watchdog
    #1ms;
    failures++;
    $display("FAIL watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin : stim
    int s, m;
    bit seen8 [256];

    // 1. literal 3-bit table
    for (int u = 0; u < 8; u++) begin
      u3 = 3'(u);
      #1;
      check("table3", u, int'(s3), int'(m3), int'(table3[u][2]), int'(table3[u][1:0]));
    end

    // 2. arithmetic reference at N = 2, 8, 12
    for (int u = 0; u < 4; u++) begin
      u2 = 2'(u);
      #1;
      ref_conv(2, u, s, m);
      check("n2", u, int'(s2), int'(m2), s, m);
    end
    for (int u = 0; u < 256; u++) begin
      u8 = 8'(u);
      #1;
      ref_conv(8, u, s, m);
      check("n8", u, int'(s8), int'(m8), s, m);
      // 3. one-to-one
      checks++;
      if (seen8[{s8, m8}]) begin
        failures++;
        $display("FAIL n8 code %b produced twice (u=%0d)", {s8, m8}, u);
      end
      seen8[{s8, m8}] = 1'b1;
    end
    for (int u = 0; u < 4096; u++) begin
      u12 = 12'(u);
      #1;
      ref_conv(12, u, s, m);
      check("n12", u, int'(s12), int'(m12), s, m);
    end

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
