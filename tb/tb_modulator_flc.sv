// tb_modulator_flc: self-checking test of the phase-shifted PWM modulator at
// its default parameters (100 MHz clock, 800 Hz switching frequency).
// Checked, period by period between syn_dsp pulses:
//   - period length 125000 clk (100 MHz / 800 Hz), +/-1 for the NCO
//   - carrier range -32766 .. +32766 and a step of at most 2 per clk
//   - duty of PWMk = (Ink + 32766) / 65532 within 0.2 %
//   - one rising and one falling edge per PWM output per period
//   - PWM2 and PWM3 rise T/3 and 2T/3 after PWM1 for equal inputs
//   - the sum of the three PWMs (the leg's output level) changes 6 times per
//     period, i.e. the output switches at three times the carrier frequency
module tb_modulator_flc;
  import flc_pkg::*;

  localparam int T = 125000;

  logic clk = 1'b0, rst_n = 1'b0;
  sample_t in_v[3], car[3];
  logic pwm[3], syn;
  int checks = 0, failures = 0;

  modulator_flc dut (.clk, .rst_n, .in_i(in_v), .pwm_o(pwm), .carrier_o(car), .syn_dsp_o(syn));

  always #5 clk = ~clk;

  task automatic chk(input string nm, input bit ok);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", nm); end
  endtask

  // per-period statistics
  int cyc, hi[3], rises[3], falls[3], rise_at[3], lvl_changes;
  int cmin, cmax, max_step;
  logic pwm_q[3];
  int lvl_q;
  sample_t car_q[3];
  int periods;
  bit armed;

  task automatic measure_period(input int pin0, input int pin1, input int pin2, input bit phase_chk);
    int pin[3];
    pin[0] = pin0; pin[1] = pin1; pin[2] = pin2;
    // wait for the start of a period
    @(posedge clk iff syn);
    cyc = 0; lvl_changes = 0;
    for (int k = 0; k < 3; k++) begin hi[k] = 0; rises[k] = 0; falls[k] = 0; rise_at[k] = -1; end
    for (int k = 0; k < 3; k++) pwm_q[k] = pwm[k];
    lvl_q = int'(pwm[0]) + int'(pwm[1]) + int'(pwm[2]);
    cmin = 99999; cmax = -99999; max_step = 0;
    for (int k = 0; k < 3; k++) car_q[k] = car[k];
    do begin
      @(posedge clk);
      cyc++;
      for (int k = 0; k < 3; k++) begin
        int d;
        if (pwm[k]) hi[k]++;
        if (pwm[k] && !pwm_q[k]) begin rises[k]++; rise_at[k] = cyc; end
        if (!pwm[k] && pwm_q[k]) falls[k]++;
        pwm_q[k] = pwm[k];
        if (int'(car[k]) < cmin) cmin = int'(car[k]);
        if (int'(car[k]) > cmax) cmax = int'(car[k]);
        d = int'(car[k]) - int'(car_q[k]);
        if (d < 0) d = -d;
        if (d > max_step) max_step = d;
        car_q[k] = car[k];
      end
      if (int'(pwm[0]) + int'(pwm[1]) + int'(pwm[2]) != lvl_q) begin
        lvl_changes++;
        lvl_q = int'(pwm[0]) + int'(pwm[1]) + int'(pwm[2]);
      end
    end while (!syn && cyc < 2 * T);
    periods++;
    chk($sformatf("period %0d clk, expected %0d", cyc, T), cyc >= T - 1 && cyc <= T + 1);
    chk($sformatf("carrier range %0d..%0d", cmin, cmax), cmin == -32766 && cmax == 32766);
    chk($sformatf("carrier step %0d", max_step), max_step <= 2);
    for (int k = 0; k < 3; k++) begin
      real exp_d;
      int e;
      exp_d = (real'(pin[k]) + 32766.0) / 65532.0 * real'(T);
      e = hi[k] - int'(exp_d);
      chk($sformatf("duty PWM%0d high %0d expected %0d", k + 1, hi[k], int'(exp_d)),
          e <= T / 500 && e >= -(T / 500));
      chk($sformatf("edges PWM%0d rises %0d falls %0d", k + 1, rises[k], falls[k]),
          rises[k] == 1 && falls[k] == 1);
    end
    chk($sformatf("output level changes %0d per period", lvl_changes), lvl_changes == 6);
    if (phase_chk) begin
      for (int k = 1; k < 3; k++) begin
        int lag;
        lag = (rise_at[k] - rise_at[0] + T) % T;
        chk($sformatf("PWM%0d lags PWM1 by %0d, expected %0d", k + 1, lag, k * T / 3),
            lag >= k * T / 3 - 3 && lag <= k * T / 3 + 3);
      end
    end
  endtask

  initial begin
    repeat (12 * T) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    periods = 0;
    for (int k = 0; k < 3; k++) in_v[k] = '0;
    repeat (3) @(posedge clk);
    #1 rst_n = 1'b1;
    measure_period(0, 0, 0, 1'b1);
    measure_period(0, 0, 0, 1'b1);
    in_v[0] = 16'sd10000; in_v[1] = -16'sd20000; in_v[2] = 16'sd25000;
    measure_period(10000, -20000, 25000, 1'b0);  // first full period with the new inputs
    measure_period(10000, -20000, 25000, 1'b0);
    in_v[0] = -16'sd30000; in_v[1] = 16'sd5; in_v[2] = 16'sd30000;
    @(posedge clk iff syn);
    measure_period(-30000, 5, 30000, 1'b0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
