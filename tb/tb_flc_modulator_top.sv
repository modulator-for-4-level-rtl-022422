// tb_flc_modulator_top: end-to-end test of the whole modulator at its default
// parameters (100 MHz clock, 800 Hz carriers, dead time 200 clk).
//
// Sequence: all-off after reset; precharge of C2 (S1+S2 on), precharge of C1
// (S1 on); a direct pattern with both switches of a pair on; then normal run.
// In run the DSP side writes voltage demands and capacitor voltages through
// syn_d, and for each full switching period (between syn_dsp pulses) the
// on-time of every gate is compared with the value worked out from the
// modulation chain:
//   M      = inverse Clarke of (Vx, Vy)
//   m1..m3 = M + y2, M - y2 + y1, M - y1 with y = clamp(KP*(V-V*)/256, +/-4096)
//   on     = (m + 32766) / 65532 * T - DT     (one turn-on per period)
// within T/250. Every cycle of the run also checks that no complementary pair
// is on at once. Each mechanism (data latch, every precharge mode, balancing
// correction, controller limiting, dead-time gaps, DSP sync pulses, relays)
// is counted and must have occurred.
module tb_flc_modulator_top;
  import flc_pkg::*;

  localparam int T  = 125000;
  localparam int DT = 200;
  localparam int A  = 32766;

  logic clk = 1'b0, rst_n = 1'b0, syn_d = 1'b0;
  sample_t vx, vy, v1[NPH], v1r[NPH], v2[NPH], v2r[NPH];
  pre_mode_t mode;
  leg_gates_t direct[NPH], gates[NPH];
  logic rb, rl, rb_o, rl_o, syn_o;
  logic lim[NPH];
  // copy of what the DSP last strobed in, for the expected values
  sample_t lvx, lvy, l1[NPH], l1r[NPH], l2[NPH], l2r[NPH];

  int checks = 0, failures = 0;
  // mechanism counters
  int n_latch = 0, n_off = 0, n_pre_c2 = 0, n_pre_c1 = 0, n_direct_both = 0, n_run_periods = 0;
  int n_balance = 0, n_limit = 0, n_dead_gap = 0, n_sync = 0, n_relay = 0;

  flc_modulator_top dut (
    .clk, .rst_n, .syn_d, .vx_i(vx), .vy_i(vy), .v1_i(v1), .v1ref_i(v1r),
    .v2_i(v2), .v2ref_i(v2r), .mode_i(mode), .direct_i(direct),
    .relay_bypass_i(rb), .relay_line_i(rl),
    .gates_o(gates), .relay_bypass_o(rb_o), .relay_line_o(rl_o),
    .syn_dsp_o(syn_o), .bal_lim_o(lim)
  );

  always #5 clk = ~clk;

  always @(posedge clk) if (syn_o) n_sync++;

  task automatic chk(input string nm, input bit ok);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", nm); end
  endtask

  // DSP write: present data, pulse syn_d
  task automatic dsp_write();
    @(negedge clk) syn_d = 1'b1;
    repeat (4) @(negedge clk);
    syn_d = 1'b0;
    repeat (4) @(negedge clk);
    lvx = vx; lvy = vy;
    l1 = v1; l1r = v1r; l2 = v2; l2r = v2r;
    n_latch++;
  endtask

  function automatic real clampr(input real v, input real lo, input real hi);
    return v > hi ? hi : (v < lo ? lo : v);
  endfunction

  // expected cell modulation signals of phase p
  function automatic void expected_m(input int p, output real m[3], output bit lim_e);
    real mp, y1, y2, s3;
    s3 = $sqrt(3.0) / 2.0;
    case (p)
      0: mp = real'(lvx);
      1: mp = -real'(lvx) / 2.0 + s3 * real'(lvy);
      default: mp = -real'(lvx) / 2.0 - s3 * real'(lvy);
    endcase
    mp = clampr(mp, -32768.0, 32767.0);
    y1 = $floor(real'(int'(l1[p]) - int'(l1r[p])) * 256.0 / 256.0);
    y2 = $floor(real'(int'(l2[p]) - int'(l2r[p])) * 256.0 / 256.0);
    lim_e = (y1 > 4096.0 || y1 < -4096.0 || y2 > 4096.0 || y2 < -4096.0);
    y1 = clampr(y1, -4096.0, 4096.0);
    y2 = clampr(y2, -4096.0, 4096.0);
    m[0] = clampr(mp + y2, -32768.0, 32767.0);
    m[1] = clampr(mp - y2 + y1, -32768.0, 32767.0);
    m[2] = clampr(mp - y1, -32768.0, 32767.0);
  endfunction

  // One full switching period in run mode: measure and compare on-times.
  task automatic run_period(input string tag);
    int on_s[NPH][3], on_n[NPH][3];
    int cyc;
    @(posedge clk iff syn_o);
    foreach (on_s[p, k]) begin on_s[p][k] = 0; on_n[p][k] = 0; end
    cyc = 0;
    do begin
      @(posedge clk);
      cyc++;
      for (int p = 0; p < NPH; p++) begin
        logic [2:0] s, sn;
        s  = {gates[p].s3, gates[p].s2, gates[p].s1};
        sn = {gates[p].s3n, gates[p].s2n, gates[p].s1n};
        for (int k = 0; k < 3; k++) begin
          if (s[k]) on_s[p][k]++;
          if (sn[k]) on_n[p][k]++;
          if (s[k] && sn[k]) begin
            failures++;
            $display("FAIL %s shoot-through phase %0d cell %0d", tag, p, k + 1);
          end
          if (!s[k] && !sn[k]) n_dead_gap++;
        end
      end
    end while (!syn_o && cyc < 2 * T);
    chk($sformatf("%s period %0d", tag, cyc), cyc >= T - 1 && cyc <= T + 1);
    for (int p = 0; p < NPH; p++) begin
      real m[3];
      bit lim_e;
      expected_m(p, m, lim_e);
      chk($sformatf("%s phase %0d limit flag %0d exp %0d", tag, p, lim[p], lim_e), lim[p] == lim_e);
      if (lim_e) n_limit++;
      for (int k = 0; k < 3; k++) begin
        int e_on, e_off;
        e_on  = int'((m[k] + A) / (2.0 * A) * T) - DT;
        e_off = T - int'((m[k] + A) / (2.0 * A) * T) - DT;
        if (e_on < 0) e_on = 0;
        if (e_off < 0) e_off = 0;
        chk($sformatf("%s phase %0d S%0d on %0d exp %0d", tag, p, k + 1, on_s[p][k], e_on),
            on_s[p][k] - e_on <= T / 250 && e_on - on_s[p][k] <= T / 250);
        chk($sformatf("%s phase %0d S%0dn on %0d exp %0d", tag, p, k + 1, on_n[p][k], e_off),
            on_n[p][k] - e_off <= T / 250 && e_off - on_n[p][k] <= T / 250);
      end
    end
    n_run_periods++;
  endtask

  task automatic expect_static(input string tag, input logic [5:0] pat, input int md);
    for (int p = 0; p < NPH; p++)
      chk($sformatf("%s phase %0d gates %b exp %b", tag, p, gates[p], pat), 6'(gates[p]) == pat);
  endtask

  initial begin
    repeat (16 * T) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    mode = MODE_OFF; rb = 1'b0; rl = 1'b0;
    vx = 16'sd5000; vy = 16'sd0;
    for (int p = 0; p < NPH; p++) begin
      v1[p] = 16'sd10000; v1r[p] = 16'sd10000; v2[p] = 16'sd20000; v2r[p] = 16'sd20000;
      direct[p] = '0;
    end
    repeat (3) @(posedge clk);
    #1 rst_n = 1'b1;
    repeat (DT + 10) @(posedge clk);
    #1 expect_static("off", 6'b000000, 0);
    n_off++;

    // precharge: line contact closed, C2 first, then C1
    rl = 1'b1;
    mode = MODE_PRE_C2;
    repeat (DT / 2) @(posedge clk);
    #1 expect_static("pre_c2 inside dead time", 6'b000000, 2);
    repeat (DT) @(posedge clk);
    #1 expect_static("pre_c2", 6'b110000, 2);
    chk("relay line closed", rl_o == 1'b1);
    n_relay++;
    n_pre_c2++;
    mode = MODE_PRE_C1;
    repeat (DT + 5) @(posedge clk);
    #1 expect_static("pre_c1", 6'b100000, 3);
    n_pre_c1++;
    // direct pattern with both transistors of pair 1 on
    for (int p = 0; p < NPH; p++) direct[p] = leg_gates_t'(6'b100100);
    mode = MODE_DIRECT;
    repeat (DT + 5) @(posedge clk);
    #1 expect_static("direct both of pair", 6'b100100, 4);
    n_direct_both++;
    // precharge done: bypass the resistor
    rb = 1'b1;
    repeat (3) @(posedge clk);
    #1 chk("relay bypass closed", rb_o == 1'b1);
    n_relay++;

    // normal run, balanced capacitors
    mode = MODE_RUN;
    vx = 16'sd12000; vy = 16'sd0;
    dsp_write();
    run_period("balanced");
    run_period("balanced");
    // rotated voltage vector, capacitor errors in phase a
    vx = 16'sd8000; vy = 16'sd14000;
    v2[0] = 16'sd21000;  // C2 of phase a 1000 above its demand
    v1[0] = 16'sd9500;   // C1 of phase a 500 below
    dsp_write();
    n_balance++;
    run_period("phase a errors");
    // large error in phase b: limiter
    v1[1] = 16'sd25000;
    v2[2] = 16'sd12000;
    dsp_write();
    run_period("limiting");
    // data changed at the inputs without syn_d must have no effect
    vx = -16'sd20000;
    run_period("no strobe");
    vx = 16'sd8000;
    // negative demand, errors of both signs
    vx = -16'sd15000; vy = -16'sd9000;
    v1[0] = 16'sd10300; v2[0] = 16'sd19800;
    v1[1] = 16'sd10000; v2[2] = 16'sd20000;
    dsp_write();
    n_balance++;
    run_period("negative demand");

    // back to all-off, relay to discharge
    mode = MODE_OFF; rl = 1'b0; rb = 1'b0;
    repeat (3) @(posedge clk);
    #1 expect_static("off after run", 6'b000000, 0);
    chk("relay to discharge", rl_o == 1'b0 && rb_o == 1'b0);
    n_off++;

    // mechanism coverage
    chk($sformatf("data latched %0d times", n_latch), n_latch >= 4);
    chk($sformatf("off mode %0d", n_off), n_off > 0);
    chk($sformatf("precharge C2 %0d", n_pre_c2), n_pre_c2 > 0);
    chk($sformatf("precharge C1 %0d", n_pre_c1), n_pre_c1 > 0);
    chk($sformatf("both switches of a pair %0d", n_direct_both), n_direct_both > 0);
    chk($sformatf("run periods %0d", n_run_periods), n_run_periods >= 5);
    chk($sformatf("balancing corrections %0d", n_balance), n_balance > 0);
    chk($sformatf("controller limiting %0d", n_limit), n_limit > 0);
    chk($sformatf("dead-time gaps %0d", n_dead_gap), n_dead_gap > 0);
    chk($sformatf("sync pulses %0d", n_sync), n_sync >= 5);
    chk($sformatf("relay operations %0d", n_relay), n_relay > 0);
    $display("mechanisms: latch=%0d off=%0d pre_c2=%0d pre_c1=%0d direct_both=%0d run_periods=%0d balance=%0d limit=%0d dead_gap_cycles=%0d sync=%0d relay=%0d",
             n_latch, n_off, n_pre_c2, n_pre_c1, n_direct_both, n_run_periods, n_balance,
             n_limit, n_dead_gap, n_sync, n_relay);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
