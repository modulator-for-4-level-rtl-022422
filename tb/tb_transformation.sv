// tb_transformation: self-checking test of the XY -> ABC conversion.
// Expected values come from real arithmetic (inverse Clarke transform,
// saturated to 16 bits); a difference of 1 LSB from the fixed-point result is
// accepted. Random vectors plus corner values, 1 clk latency checked.
module tb_transformation;
  import flc_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0;
  sample_t vx, vy, va, vb, vc;
  int checks = 0, failures = 0;

  transformation dut (.clk, .rst_n, .vx_i(vx), .vy_i(vy), .va_o(va), .vb_o(vb), .vc_o(vc));

  always #5 clk = ~clk;

  function automatic int ref_sat(input real r);
    int v;
    v = int'($floor(r + 0.5));
    if (v > 32767) v = 32767;
    if (v < -32768) v = -32768;
    return v;
  endfunction

  task automatic check_one(input sample_t x, input sample_t y);
    int ea, eb, ec;
    real s3;
    s3 = $sqrt(3.0) / 2.0;
    vx = x; vy = y;
    @(posedge clk);
    #1;
    ea = int'(x);
    eb = ref_sat(-real'(x) / 2.0 + s3 * real'(y));
    ec = ref_sat(-real'(x) / 2.0 - s3 * real'(y));
    checks += 3;
    if (int'(va) != ea) begin failures++; $display("FAIL va x=%0d y=%0d got %0d exp %0d", x, y, va, ea); end
    if ((int'(vb) - eb) > 1 || (eb - int'(vb)) > 1) begin
      failures++; $display("FAIL vb x=%0d y=%0d got %0d exp %0d", x, y, vb, eb);
    end
    if ((int'(vc) - ec) > 1 || (ec - int'(vc)) > 1) begin
      failures++; $display("FAIL vc x=%0d y=%0d got %0d exp %0d", x, y, vc, ec);
    end
  endtask

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    vx = '0; vy = '0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1'b1;
    check_one(16'sd0, 16'sd0);
    check_one(16'sd20000, 16'sd0);
    check_one(16'sd0, 16'sd20000);
    check_one(16'sh7FFF, 16'sh7FFF);   // saturates vb
    check_one(16'sh8000, 16'sh7FFF);
    check_one(16'sh8000, 16'sh8000);
    // a full turn of a rotating vector of amplitude 30000
    for (int i = 0; i < 360; i++) begin
      real th;
      th = 2.0 * 3.14159265358979 * real'(i) / 360.0;
      check_one(sample_t'(int'($floor(30000.0 * $cos(th) + 0.5))),
                sample_t'(int'($floor(30000.0 * $sin(th) + 0.5))));
    end
    for (int i = 0; i < 2000; i++) check_one(sample_t'($urandom), sample_t'($urandom));
    // latency: output must not change before the clock edge
    vx = 16'sd1000; vy = 16'sd0;
    @(posedge clk); #1;
    vx = -16'sd1000;
    #2;
    checks++;
    if (va != 16'sd1000) begin failures++; $display("FAIL output changed before clock"); end
    @(posedge clk); #1;
    checks++;
    if (va != -16'sd1000) begin failures++; $display("FAIL output not updated after 1 clk"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
