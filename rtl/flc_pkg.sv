// flc_pkg: types and constants shared by the four-level flying-capacitor
// (4L-FLC) inverter modulator.
//
// All voltages and modulation signals travel as 16-bit signed integers, as the
// "_16" signals of the modulator do; the scaling of a capacitor voltage to a
// 16-bit code is set by the DSP that sends it and does not matter here, as long
// as measured and desired values share it. A phase leg of the 4L-FLC inverter
// has three complementary switch pairs (S1/S1n, S2/S2n, S3/S3n, counted from
// the positive dc rail). The precharge modes are the combinations used while
// the flying capacitors are charged, plus a mode where the DSP gives the
// pattern directly; their encoding is this design's own.
package flc_pkg;

  localparam int unsigned DW = 16;  // data width of every "_16" signal
  localparam int unsigned NPH = 3;  // phases of the inverter

  typedef logic signed [DW-1:0] sample_t;

  // Gate commands of one phase leg.
  typedef struct packed {
    logic s1;
    logic s2;
    logic s3;
    logic s1n;
    logic s2n;
    logic s3n;
  } leg_gates_t;

  // Switch pattern selector of the precharge logic.
  typedef enum logic [2:0] {
    MODE_OFF    = 3'd0,  // every IGBT off
    MODE_RUN    = 3'd1,  // complementary phase-shifted PWM
    MODE_PRE_C2 = 3'd2,  // S1 and S2 on: charge C2
    MODE_PRE_C1 = 3'd3,  // S1 on: charge C1
    MODE_DIRECT = 3'd4   // DSP-given pattern, both switches of a pair allowed
  } pre_mode_t;

  localparam sample_t SAMPLE_MAX = sample_t'(16'sh7FFF);
  localparam sample_t SAMPLE_MIN = sample_t'(16'sh8000);

  // Saturate a wide signed value to the 16-bit sample range.
  function automatic sample_t sat16(input logic signed [31:0] v);
    if (v > 32'(SAMPLE_MAX)) return SAMPLE_MAX;
    if (v < 32'(SAMPLE_MIN)) return SAMPLE_MIN;
    return sample_t'(v[DW-1:0]);
  endfunction

endpackage
