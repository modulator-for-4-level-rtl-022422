// precharging_logic_flc: switch-pattern selector between the PWM modulators
// and the gate drivers of the three-phase 4L-FLC inverter.
//
// In normal run every switch pair of a leg is driven complementarily from its
// cell's PWM signal (Sk = PWMk, Skn = not PWMk). While the flying capacitors
// are precharged the DSP, which runs the whole precharge sequence, selects
// fixed combinations instead: first S1 and S2 on in every leg so that C2
// charges, then S1 alone so that C1 charges. The DSP may also send a complete
// pattern that turns on both transistors of a complementary pair at once,
// which normal operation never does. MODE_OFF turns every IGBT off (also the
// state after reset). The two relays (precharge-resistor bypass; line contact
// versus quick-discharge contact) follow the DSP's relay commands, and the
// carrier synchronisation pulse of the modulators is passed on to the DSP.
//
// Which combinations exist and what they charge follows the documented
// precharge procedure; the mode encoding, the direct-pattern mode as the way to
// turn on both switches of a pair, and the choice that all complementary
// switches are off in the two precharge combinations are this design's own.
//
// Timing: all outputs are registered, 1 clk after the inputs.
module precharging_logic_flc
  import flc_pkg::*;
(
  input  logic       clk,
  input  logic       rst_n,
  input  logic       pwm_i    [NPH][3],  // [phase][cell] PWM1..PWM3
  input  pre_mode_t  mode_i,
  input  leg_gates_t direct_i [NPH],     // pattern for MODE_DIRECT
  input  logic       relay_bypass_i,     // command: bypass the precharge resistor
  input  logic       relay_line_i,       // command: 1 = connect to ac line, 0 = discharge
  input  logic       syn_dsp_i,
  output leg_gates_t switches_o [NPH],   // Switches_Out
  output logic       relay_bypass_o,
  output logic       relay_line_o,
  output logic       syn_dsp_o
);

  leg_gates_t nxt [NPH];

  always_comb begin
    for (int p = 0; p < NPH; p++) begin
      nxt[p] = '0;
      unique case (mode_i)
        MODE_RUN: begin
          nxt[p].s1  = pwm_i[p][0];
          nxt[p].s2  = pwm_i[p][1];
          nxt[p].s3  = pwm_i[p][2];
          nxt[p].s1n = ~pwm_i[p][0];
          nxt[p].s2n = ~pwm_i[p][1];
          nxt[p].s3n = ~pwm_i[p][2];
        end
        MODE_PRE_C2: begin
          nxt[p].s1 = 1'b1;
          nxt[p].s2 = 1'b1;
        end
        MODE_PRE_C1: nxt[p].s1 = 1'b1;
        MODE_DIRECT: nxt[p] = direct_i[p];
        default:     nxt[p] = '0;  // MODE_OFF and unused codes
      endcase
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int p = 0; p < NPH; p++) switches_o[p] <= '0;
      relay_bypass_o <= 1'b0;
      relay_line_o   <= 1'b0;
      syn_dsp_o      <= 1'b0;
    end else begin
      for (int p = 0; p < NPH; p++) switches_o[p] <= nxt[p];
      relay_bypass_o <= relay_bypass_i;
      relay_line_o   <= relay_line_i;
      syn_dsp_o      <= syn_dsp_i;
    end
  end

  // Outside MODE_DIRECT a complementary pair is never on at once.
  for (genvar p = 0; p < NPH; p++) begin : g_chk
    a_no_shoot: assert property (@(posedge clk) disable iff (!rst_n)
        $past(mode_i) != MODE_DIRECT |->
        !(switches_o[p].s1 & switches_o[p].s1n) &&
        !(switches_o[p].s2 & switches_o[p].s2n) &&
        !(switches_o[p].s3 & switches_o[p].s3n));
  end

endmodule
