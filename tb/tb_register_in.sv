// tb_register_in: self-checking test of the input register.
// Random data is presented, then syn_d is raised. The outputs must keep the
// old set until 3 clk after the rising edge and hold the new set from then
// on, also while the inputs change again with syn_d high or low.
module tb_register_in;
  import flc_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0, syn_d = 1'b0;
  sample_t vx, vy, vx_o, vy_o;
  sample_t v1[NPH], v1r[NPH], v2[NPH], v2r[NPH];
  sample_t v1_o[NPH], v1r_o[NPH], v2_o[NPH], v2r_o[NPH];
  logic upd;
  int checks = 0, failures = 0, updates = 0;

  register_in dut (
    .clk, .rst_n, .syn_d, .vx_i(vx), .vy_i(vy), .v1_i(v1), .v1ref_i(v1r),
    .v2_i(v2), .v2ref_i(v2r), .vx_o, .vy_o, .v1_o, .v1ref_o(v1r_o), .v2_o,
    .v2ref_o(v2r_o), .upd_o(upd)
  );

  always #5 clk = ~clk;
  always @(posedge clk) if (rst_n && upd) updates++;

  // expected contents: 14 words
  sample_t exp_w[14];

  task automatic compare(input string what);
    sample_t got[14];
    got[0] = vx_o; got[1] = vy_o;
    for (int p = 0; p < NPH; p++) begin
      got[2+p] = v1_o[p]; got[5+p] = v1r_o[p]; got[8+p] = v2_o[p]; got[11+p] = v2r_o[p];
    end
    for (int i = 0; i < 14; i++) begin
      checks++;
      if (got[i] !== exp_w[i]) begin
        failures++;
        $display("FAIL %s word %0d got %0d exp %0d", what, i, got[i], exp_w[i]);
      end
    end
  endtask

  task automatic drive_random();
    vx = sample_t'($urandom); vy = sample_t'($urandom);
    for (int p = 0; p < NPH; p++) begin
      v1[p] = sample_t'($urandom); v1r[p] = sample_t'($urandom);
      v2[p] = sample_t'($urandom); v2r[p] = sample_t'($urandom);
    end
  endtask

  function automatic void snap();
    exp_w[0] = vx; exp_w[1] = vy;
    for (int p = 0; p < NPH; p++) begin
      exp_w[2+p] = v1[p]; exp_w[5+p] = v1r[p]; exp_w[8+p] = v2[p]; exp_w[11+p] = v2r[p];
    end
  endfunction

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    drive_random();
    foreach (exp_w[i]) exp_w[i] = '0;
    repeat (3) @(posedge clk);
    #1 rst_n = 1'b1;
    repeat (3) @(posedge clk);
    #1 compare("after reset");
    for (int it = 0; it < 50; it++) begin
      drive_random();
      repeat (4) @(posedge clk);
      #1 compare("before syn_d");           // no edge yet: old data kept
      syn_d = 1'b1;
      @(posedge clk); @(posedge clk);
      #1 compare("2 clk after edge");       // still old data
      @(posedge clk);
      snap();
      #1 compare("3 clk after edge");       // new data
      drive_random();                       // inputs change while syn_d high
      repeat (5) @(posedge clk);
      #1 compare("syn_d held high");
      syn_d = 1'b0;
      repeat (5) @(posedge clk);
      #1 compare("after falling edge");
    end
    checks++;
    if (updates != 50) begin
      failures++;
      $display("FAIL update pulses %0d, expected 50", updates);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
