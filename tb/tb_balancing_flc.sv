// tb_balancing_flc: self-checking test of the balancing controllers.
// The expected cell signals are computed in real arithmetic:
//   y = clamp(floor((meas - ref) * KP / 2^KP_FRAC), +/-Y_LIM)
//   m1 = M + y2, m2 = M - y2 + y1, m3 = M - y1, each saturated to 16 bits.
// Covered: zero error (M passes unchanged), small errors, limiting, sign of
// a negative gain, and output saturation.
module tb_balancing_flc;
  import flc_pkg::*;

  localparam int KP = 384;   // 1.5
  localparam int KP_FRAC = 8;
  localparam int Y_LIM = 3000;

  logic clk = 1'b0, rst_n = 1'b0;
  sample_t m, v1, v1r, v2, v2r, o1, o2, o3, n1, n2, n3;
  logic lim, nlim;
  int checks = 0, failures = 0, lim_seen = 0;

  balancing_flc #(.KP(KP), .KP_FRAC(KP_FRAC), .Y_LIM(Y_LIM)) dut (
    .clk, .rst_n, .v_in_i(m), .v1_i(v1), .v1ref_i(v1r), .v2_i(v2), .v2ref_i(v2r),
    .out1_o(o1), .out2_o(o2), .out3_o(o3), .lim_o(lim)
  );
  // second instance with the gain of opposite sign (generator operation)
  balancing_flc #(.KP(-KP), .KP_FRAC(KP_FRAC), .Y_LIM(Y_LIM)) dut_neg (
    .clk, .rst_n, .v_in_i(m), .v1_i(v1), .v1ref_i(v1r), .v2_i(v2), .v2ref_i(v2r),
    .out1_o(n1), .out2_o(n2), .out3_o(n3), .lim_o(nlim)
  );

  always #5 clk = ~clk;

  function automatic real ctrl(input int e, input int kp, output bit l);
    real y;
    y = $floor(real'(e) * real'(kp) / real'(1 << KP_FRAC));
    l = 1'b0;
    if (y > Y_LIM) begin y = Y_LIM; l = 1'b1; end
    if (y < -Y_LIM) begin y = -Y_LIM; l = 1'b1; end
    return y;
  endfunction

  function automatic int rsat(input real r);
    if (r > 32767.0) return 32767;
    if (r < -32768.0) return -32768;
    return int'(r);
  endfunction

  task automatic chk(input string nm, input int got, input int exp_v);
    checks++;
    if (got != exp_v) begin
      failures++;
      $display("FAIL %s got %0d exp %0d (M=%0d v1=%0d v1r=%0d v2=%0d v2r=%0d)",
               nm, got, exp_v, m, v1, v1r, v2, v2r);
    end
  endtask

  task automatic apply(input int mi, input int a1, input int r1, input int a2, input int r2);
    real y1, y2, z1, z2;
    bit l1, l2, k1, k2;
    m = sample_t'(mi); v1 = sample_t'(a1); v1r = sample_t'(r1); v2 = sample_t'(a2); v2r = sample_t'(r2);
    y1 = ctrl(a1 - r1, KP, l1); y2 = ctrl(a2 - r2, KP, l2);
    z1 = ctrl(a1 - r1, -KP, k1); z2 = ctrl(a2 - r2, -KP, k2);
    @(posedge clk); #1;
    chk("m1", int'(o1), rsat(real'(mi) + y2));
    chk("m2", int'(o2), rsat(real'(mi) - y2 + y1));
    chk("m3", int'(o3), rsat(real'(mi) - y1));
    chk("lim", int'(lim), int'(l1 | l2));
    chk("neg m1", int'(n1), rsat(real'(mi) + z2));
    chk("neg m2", int'(n2), rsat(real'(mi) - z2 + z1));
    chk("neg m3", int'(n3), rsat(real'(mi) - z1));
    if (lim) lim_seen++;
  endtask

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    m = '0; v1 = '0; v1r = '0; v2 = '0; v2r = '0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1'b1;
    // balanced: modulation signal passes to all cells unchanged
    apply(12345, 10000, 10000, 20000, 20000);
    apply(-5000, 7000, 7000, 14000, 14000);
    // small errors, both signs
    apply(1000, 10100, 10000, 20000, 20050);
    apply(-1000, 9900, 10000, 20070, 20000);
    // limiting
    apply(0, 20000, 10000, 20000, 20000);
    apply(0, 10000, 10000, 0, 20000);
    // saturation at the 16-bit bounds
    apply(32000, 10000, 10000, 30000, 20000);
    apply(-32000, 30000, 20000, 10000, 10000);
    for (int i = 0; i < 3000; i++) begin
      int e1, e2;
      e1 = int'($urandom_range(0, 8000)) - 4000;
      e2 = int'($urandom_range(0, 8000)) - 4000;
      apply(int'($urandom_range(0, 65535)) - 32768, 10000 + e1, 10000,
            20000 + e2, 20000);
    end
    checks++;
    if (lim_seen == 0) begin failures++; $display("FAIL limiter never active"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
