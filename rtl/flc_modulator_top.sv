// flc_modulator_top: FPGA modulator of a three-phase four-level flying-capacitor
// inverter with closed-loop balancing of the flying capacitors, followed by the
// dead-time stage.
//
// Data path (one clk each stage after the input register):
//   register_in        latches Vx, Vy and the 12 capacitor voltages on syn_D
//   transformation     XY -> ABC: one modulation signal per phase
//   balancing_flc x3   two P controllers per phase split the phase signal into
//                      three cell modulation signals m1..m3
//   modulator_flc x3   three 120-degree-shifted triangular carriers per phase,
//                      compared with m1..m3 -> PWM1..PWM3
//   precharging_logic  complementary gate pattern in run, fixed patterns while
//                      the flying capacitors are precharged, relay drive
//   dead_time          delays every turn-on by the dead time
// The chain of blocks and their connections follow the documented modulator
// structure; the synchronisation pulse of the phase-c modulator is the one
// routed through the precharge logic to the DSP, and the dead-time stage stands
// for the separate device that adds dead times after the FPGA.
//
// Interface: the DSP side is a set of parallel 16-bit words plus the strobe
// syn_d; mode, direct pattern and relay commands also come from the DSP. The
// gate outputs are one leg_gates_t per phase (a, b, c). From a change of the
// latched data to the comparator inputs takes 3 clk (transformation, balancing,
// carrier compare); the gate outputs follow 1 clk later for a turn-off and
// DT_CYCLES + 1 clk later for a turn-on.
module flc_modulator_top
  import flc_pkg::*;
#(
  parameter int              KP        = 256,
  parameter int              KP_FRAC   = 8,
  parameter int              Y_LIM     = 4096,
  parameter longint unsigned CLK_HZ    = 100_000_000,
  parameter longint unsigned F_SW      = 800,
  parameter int unsigned     DT_CYCLES = 200
) (
  input  logic       clk,
  input  logic       rst_n,
  // DSP data and strobe
  input  logic       syn_d,
  input  sample_t    vx_i,
  input  sample_t    vy_i,
  input  sample_t    v1_i    [NPH],
  input  sample_t    v1ref_i [NPH],
  input  sample_t    v2_i    [NPH],
  input  sample_t    v2ref_i [NPH],
  // DSP commands for the precharge logic
  input  pre_mode_t  mode_i,
  input  leg_gates_t direct_i [NPH],
  input  logic       relay_bypass_i,
  input  logic       relay_line_i,
  // to the power stage and back to the DSP
  output leg_gates_t gates_o [NPH],
  output logic       relay_bypass_o,
  output logic       relay_line_o,
  output logic       syn_dsp_o,
  output logic       bal_lim_o [NPH]   // a balancing controller of the phase is limiting
);

  sample_t vx_s, vy_s;
  sample_t v1_s [NPH], v1ref_s [NPH], v2_s [NPH], v2ref_s [NPH];

  register_in u_reg_in (
    .clk, .rst_n, .syn_d,
    .vx_i, .vy_i, .v1_i, .v1ref_i, .v2_i, .v2ref_i,
    .vx_o(vx_s), .vy_o(vy_s), .v1_o(v1_s), .v1ref_o(v1ref_s),
    .v2_o(v2_s), .v2ref_o(v2ref_s), .upd_o()
  );

  sample_t vabc [NPH];

  transformation u_xform (
    .clk, .rst_n, .vx_i(vx_s), .vy_i(vy_s),
    .va_o(vabc[0]), .vb_o(vabc[1]), .vc_o(vabc[2])
  );

  sample_t m     [NPH][3];
  logic    pwm   [NPH][3];
  logic    syn_p [NPH];

  for (genvar p = 0; p < NPH; p++) begin : g_phase
    balancing_flc #(.KP(KP), .KP_FRAC(KP_FRAC), .Y_LIM(Y_LIM)) u_bal (
      .clk, .rst_n,
      .v_in_i(vabc[p]), .v1_i(v1_s[p]), .v1ref_i(v1ref_s[p]),
      .v2_i(v2_s[p]), .v2ref_i(v2ref_s[p]),
      .out1_o(m[p][0]), .out2_o(m[p][1]), .out3_o(m[p][2]),
      .lim_o(bal_lim_o[p])
    );

    modulator_flc #(.CLK_HZ(CLK_HZ), .F_SW(F_SW)) u_mod (
      .clk, .rst_n,
      .in_i(m[p]), .pwm_o(pwm[p]), .carrier_o(), .syn_dsp_o(syn_p[p])
    );
  end

  leg_gates_t sw [NPH];
  logic       syn_pre;

  precharging_logic_flc u_pre (
    .clk, .rst_n,
    .pwm_i(pwm), .mode_i, .direct_i, .relay_bypass_i, .relay_line_i,
    .syn_dsp_i(syn_p[NPH-1]),
    .switches_o(sw), .relay_bypass_o, .relay_line_o, .syn_dsp_o(syn_pre)
  );

  assign syn_dsp_o = syn_pre;

  localparam int unsigned NG = NPH * $bits(leg_gates_t);
  logic [NG-1:0] g_flat, g_dt;

  always_comb begin
    for (int p = 0; p < NPH; p++) g_flat[p*6 +: 6] = sw[p];
  end

  dead_time #(.N(NG), .DT_CYCLES(DT_CYCLES)) u_dt (
    .clk, .rst_n, .g_i(g_flat), .g_o(g_dt)
  );

  always_comb begin
    for (int p = 0; p < NPH; p++) gates_o[p] = g_dt[p*6 +: 6];
  end

endmodule
