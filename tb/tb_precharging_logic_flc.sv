// tb_precharging_logic_flc: self-checking test of the switch-pattern selector.
// Random PWM inputs and direct patterns are applied in every mode; the
// expected gate pattern is built in the testbench and compared 1 clk later.
// Relay commands and the synchronisation pulse must follow with 1 clk delay.
module tb_precharging_logic_flc;
  import flc_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0;
  logic pwm[NPH][3];
  pre_mode_t mode;
  leg_gates_t direct[NPH], sw[NPH];
  logic rb, rl, syn_i, rb_o, rl_o, syn_o;
  int checks = 0, failures = 0;
  int mode_seen[5];

  precharging_logic_flc dut (
    .clk, .rst_n, .pwm_i(pwm), .mode_i(mode), .direct_i(direct),
    .relay_bypass_i(rb), .relay_line_i(rl), .syn_dsp_i(syn_i),
    .switches_o(sw), .relay_bypass_o(rb_o), .relay_line_o(rl_o), .syn_dsp_o(syn_o)
  );

  always #5 clk = ~clk;

  // expected gates of one leg as a 6-bit word {s1,s2,s3,s1n,s2n,s3n}
  function automatic logic [5:0] expect_leg(input int md, input logic a, input logic b,
                                            input logic c, input logic [5:0] dir);
    case (md)
      1: return {a, b, c, ~a, ~b, ~c};
      2: return 6'b110_000;
      3: return 6'b100_000;
      4: return dir;
      default: return 6'b000_000;
    endcase
  endfunction

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [5:0] e;
    int md;
    mode = MODE_RUN; rb = 1'b0; rl = 1'b0; syn_i = 1'b0;
    for (int p = 0; p < NPH; p++) begin
      direct[p] = '0;
      for (int k = 0; k < 3; k++) pwm[p][k] = 1'b1;
    end
    foreach (mode_seen[i]) mode_seen[i] = 0;
    @(posedge clk); #1;
    // in reset every gate is off
    for (int p = 0; p < NPH; p++) begin
      checks++;
      if (sw[p] != '0) begin failures++; $display("FAIL gates on during reset"); end
    end
    rst_n = 1'b1;
    for (int it = 0; it < 4000; it++) begin
      md = (it < 50) ? it % 5 : int'($urandom_range(0, 7));
      mode = pre_mode_t'(md);
      for (int p = 0; p < NPH; p++) begin
        direct[p] = leg_gates_t'($urandom_range(0, 63));
        for (int k = 0; k < 3; k++) pwm[p][k] = 1'($urandom);
      end
      rb = 1'($urandom); rl = 1'($urandom); syn_i = 1'($urandom);
      @(posedge clk); #1;
      if (md < 5) mode_seen[md]++;
      for (int p = 0; p < NPH; p++) begin
        e = expect_leg(md, pwm[p][0], pwm[p][1], pwm[p][2], direct[p]);
        checks++;
        if (6'(sw[p]) != e) begin
          failures++;
          $display("FAIL mode %0d phase %0d got %b exp %b", md, p, sw[p], e);
        end
      end
      checks += 3;
      if (rb_o != rb) begin failures++; $display("FAIL relay bypass"); end
      if (rl_o != rl) begin failures++; $display("FAIL relay line"); end
      if (syn_o != syn_i) begin failures++; $display("FAIL syn_dsp"); end
    end
    foreach (mode_seen[i]) begin
      checks++;
      if (mode_seen[i] == 0) begin failures++; $display("FAIL mode %0d never applied", i); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
