// modulator_flc: phase-shifted PWM for the three cells of one 4L-FLC leg.
//
// Three triangular carriers span the signed 16-bit range and are shifted
// against each other by one third of the switching period; each is compared
// with its cell's modulation signal and PWMk is 1 while Ink is above carrier k.
// The output voltage of the leg therefore switches at three times the carrier
// frequency (2.4 kHz for the 800 Hz default). Carrier count, range, comparison
// and the 800 Hz switching frequency follow the documented modulator.
//
// How the carriers are made (this design's choice): an NCO (32-bit phase
// accumulator clocked by clk, increment derived from CLK_HZ and F_SW) gives a
// tick at PER * F_SW per second. Each carrier has a phase counter p in
// [0, PER), PER = 2*HALF = 65532, advanced on every tick; carrier k starts
// (k-1)*PER/3 ticks behind carrier 1. Its value is
//   tri = 2*p - A           for p <  HALF   (rising)
//   tri = 2*(PER - p) - A   for p >= HALF   (falling),  A = 32766,
// a triangle from -32766 to +32766 in steps of 2. PER was picked so that it
// divides by 3 and the three shifts are exact. The clock frequency of the
// FPGA is not given; CLK_HZ = 100 MHz is assumed.
//
// syn_dsp_o pulses for one clk at the valley of carrier 1, once per switching
// period, as a synchronisation signal for the DSP. PWM and carriers are
// registered: a change of Ink shows on PWMk 1 clk later.
module modulator_flc
  import flc_pkg::*;
#(
  parameter longint unsigned CLK_HZ = 100_000_000,
  parameter longint unsigned F_SW   = 800
) (
  input  logic    clk,
  input  logic    rst_n,
  input  sample_t in_i  [3],     // In1_16 .. In3_16
  output logic    pwm_o [3],     // PWM1 .. PWM3
  output sample_t carrier_o [3], // carrier values, for observation
  output logic    syn_dsp_o
);

  localparam int unsigned HALF = 32766;
  localparam int unsigned PER  = 2 * HALF;  // ticks per switching period
  localparam int signed   A    = HALF;      // carrier amplitude
  localparam longint unsigned INC_RAW =
      ((64'd1 << 32) * F_SW * 64'(PER) + CLK_HZ / 2) / CLK_HZ;
  localparam logic [31:0] INC = (INC_RAW > 64'hFFFF_FFFF) ? 32'hFFFF_FFFF : 32'(INC_RAW);

  logic [31:0] acc;
  logic        tick;
  logic [32:0] acc_sum;

  assign acc_sum = {1'b0, acc} + {1'b0, INC};

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      acc  <= '0;
      tick <= 1'b0;
    end else begin
      acc  <= acc_sum[31:0];
      tick <= acc_sum[32];
    end
  end

  logic [15:0] ph [3];
  sample_t     tri_v [3];

  always_comb begin
    for (int k = 0; k < 3; k++) begin
      if (32'(ph[k]) < HALF) tri_v[k] = sample_t'(2 * int'(ph[k]) - A);
      else                   tri_v[k] = sample_t'(2 * (int'(PER) - int'(ph[k])) - A);
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int k = 0; k < 3; k++) begin
        // carrier k lags carrier 1 by k*PER/3 ticks
        ph[k]        <= 16'((PER - k * (PER / 3)) % PER);
        pwm_o[k]     <= 1'b0;
        carrier_o[k] <= '0;
      end
      syn_dsp_o <= 1'b0;
    end else begin
      for (int k = 0; k < 3; k++) begin
        if (tick) ph[k] <= (32'(ph[k]) == PER - 1) ? '0 : ph[k] + 16'd1;
        pwm_o[k]     <= in_i[k] > tri_v[k];
        carrier_o[k] <= tri_v[k];
      end
      syn_dsp_o <= tick && (ph[0] == 16'(PER - 1));
    end
  end

endmodule
