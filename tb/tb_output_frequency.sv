// tb_output_frequency: the modulator at its default parameters producing a
// rotating output voltage, as in operation with a motor.
//
// A DSP model answers every synchronisation pulse (800 Hz) with a new voltage
// vector (Vx, Vy) = Am*(cos, sin)(2*pi*f*t), strobed in with syn_d, and
// balanced flying-capacitor voltages. Two output frequencies are run: 50 Hz
// for three fundamental periods and 8.3 Hz for one. For every switching
// period and phase the testbench checks
//   - the average leg level (S1+S2+S3)/3, less the dead-time loss, against
//     (M + A)/(2A) of the modulation signal M then in force, within 0.4 %
//   - six level changes of the leg per period on average (5 to 7 in any one
//     period), i.e. 2.4 kHz in the phase voltage; the whole run may differ by
//     5 %, since a step of M between periods can add an edge pair
// and per run the number of fundamental periods, counted from the sign
// changes of the measured phase-a average.
module tb_output_frequency;
  import flc_pkg::*;

  localparam int  T  = 125000;   // clk per switching period
  localparam int  DT = 200;
  localparam real A  = 32766.0;
  localparam real AM = 0.8 * 32766.0;
  localparam real PI = 3.14159265358979;
  localparam real TCLK = 10.0e-9;

  logic clk = 1'b0, rst_n = 1'b0, syn_d = 1'b0;
  sample_t vx, vy, v1[NPH], v1r[NPH], v2[NPH], v2r[NPH];
  pre_mode_t mode;
  leg_gates_t direct[NPH], gates[NPH];
  logic rb_o, rl_o, syn_o;
  logic lim[NPH];
  int checks = 0, failures = 0;
  longint cyc_total = 0;

  flc_modulator_top dut (
    .clk, .rst_n, .syn_d, .vx_i(vx), .vy_i(vy), .v1_i(v1), .v1ref_i(v1r),
    .v2_i(v2), .v2ref_i(v2r), .mode_i(mode), .direct_i(direct),
    .relay_bypass_i(1'b1), .relay_line_i(1'b1),
    .gates_o(gates), .relay_bypass_o(rb_o), .relay_line_o(rl_o),
    .syn_dsp_o(syn_o), .bal_lim_o(lim)
  );

  always #5 clk = ~clk;
  always @(posedge clk) cyc_total++;

  real f_out;
  int  total_changes;
  real m_now[NPH];     // modulation signal of each phase for the current period

  task automatic chk(input string nm, input bit ok);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", nm); end
  endtask

  // one switching period: strobe in the new vector, then measure
  task automatic one_period(input int idx, output real avg_a);
    real th, x, y;
    int on_cnt[NPH], changes[NPH], lvl_q[NPH], cyc;
    th = 2.0 * PI * f_out * real'(cyc_total) * TCLK;
    x = AM * $cos(th);
    y = AM * $sin(th);
    vx = sample_t'(int'(x));
    vy = sample_t'(int'(y));
    m_now[0] = real'(vx);
    m_now[1] = -real'(vx) / 2.0 + $sqrt(3.0) / 2.0 * real'(vy);
    m_now[2] = -real'(vx) / 2.0 - $sqrt(3.0) / 2.0 * real'(vy);
    // the period starts at the sync pulse; the DSP answers it with new data
    if (idx == 0) @(posedge clk iff syn_o);
    fork
      begin
        @(negedge clk) syn_d = 1'b1;
        repeat (3) @(negedge clk);
        syn_d = 1'b0;
      end
    join_none
    for (int p = 0; p < NPH; p++) begin
      on_cnt[p] = 0; changes[p] = 0;
      lvl_q[p] = int'(gates[p].s1) + int'(gates[p].s2) + int'(gates[p].s3);
    end
    cyc = 0;
    do begin
      @(posedge clk);
      cyc++;
      for (int p = 0; p < NPH; p++) begin
        int l;
        l = int'(gates[p].s1) + int'(gates[p].s2) + int'(gates[p].s3);
        on_cnt[p] += l;
        if (l != lvl_q[p]) changes[p]++;
        lvl_q[p] = l;
      end
    end while (!syn_o && cyc < 2 * T);
    for (int p = 0; p < NPH; p++) begin
      real got, expv;
      got  = real'(on_cnt[p]) / (3.0 * real'(T));
      expv = (m_now[p] + A) / (2.0 * A) - real'(DT) / real'(T);
      chk($sformatf("f=%0.1f period %0d phase %0d average %0.4f expected %0.4f",
                    f_out, idx, p, got, expv), got - expv < 0.004 && expv - got < 0.004);
      // an edge next to the period boundary may fall into either neighbour
      chk($sformatf("f=%0.1f period %0d phase %0d level changes %0d", f_out, idx, p, changes[p]),
          changes[p] >= 5 && changes[p] <= 7);
      total_changes += changes[p];
    end
    avg_a = real'(on_cnt[0]) / (3.0 * real'(T)) - 0.5;
  endtask

  task automatic run_freq(input real f, input int n_fund);
    int n_sw, crossings;
    real a, a_q;
    f_out = f;
    n_sw = int'(real'(n_fund) * 800.0 / f);
    crossings = 0;
    total_changes = 0;
    a_q = 0.0;
    for (int i = 0; i < n_sw; i++) begin
      one_period(i, a);
      if (i > 0 && a_q < 0.0 && a >= 0.0) crossings++;
      a_q = a;
    end
    chk($sformatf("f=%0.1f rising zero crossings %0d, expected %0d", f, crossings, n_fund),
        crossings >= n_fund - 1 && crossings <= n_fund + 1);
    chk($sformatf("f=%0.1f level changes %0d in %0d leg periods", f, total_changes, 3 * n_sw),
        total_changes * 100 >= 95 * 6 * 3 * n_sw && total_changes * 100 <= 105 * 6 * 3 * n_sw);
    $display("f_out=%0.1f Hz: %0d switching periods, %0d fundamental periods seen, %0.3f kHz phase-voltage switching",
             f, n_sw, crossings, real'(total_changes) / 2.0 / real'(3 * n_sw) * 0.8);
  endtask

  initial begin
    repeat (25_000_000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    mode = MODE_RUN;
    vx = '0; vy = '0;
    for (int p = 0; p < NPH; p++) begin
      v1[p] = 16'sd10000; v1r[p] = 16'sd10000; v2[p] = 16'sd20000; v2r[p] = 16'sd20000;
      direct[p] = '0;
    end
    repeat (3) @(posedge clk);
    #1 rst_n = 1'b1;
    run_freq(50.0, 3);
    run_freq(8.3, 1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
