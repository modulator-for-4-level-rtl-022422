// balancing_flc: active balancing of the two flying capacitors of one phase.
//
// Two proportional controllers work on the voltage errors of the flying
// capacitors, e = measured - desired. Each controller output is limited to
// +/-Y_LIM and added to the phase modulation signal M, so that the cell
// modulation signals become
//   m1 = M + y2
//   m2 = M - y2 + y1
//   m3 = M - y1
// where y2 comes from C2's error and y1 from C1's error. A controller's output
// raises the modulation index of the switch on one side of its capacitor and
// lowers that of the switch on the other side by the same amount, which moves
// charge into or out of that capacitor; with zero error the signal M passes
// unchanged to all three cells and the natural balancing of phase-shifted PWM
// is left undisturbed. The controller structure (P, limiter, +1/-1 weights,
// sums with M) is the documented one; the gain format (signed KP with KP_FRAC
// fraction bits), the limit value and the final saturation to 16 bits are this
// design's choices. For generator operation the sign of the gain is to be
// reversed, which is done by giving KP a negative value.
//
// Timing: one register stage, outputs valid 1 clk after the inputs.
module balancing_flc
  import flc_pkg::*;
#(
  parameter int KP      = 256,   // proportional gain, KP / 2^KP_FRAC
  parameter int KP_FRAC = 8,
  parameter int Y_LIM   = 4096   // limiter bound of each controller output
) (
  input  logic    clk,
  input  logic    rst_n,
  input  sample_t v_in_i,    // phase modulation signal M
  input  sample_t v1_i,      // measured C1 voltage
  input  sample_t v1ref_i,   // desired C1 voltage
  input  sample_t v2_i,      // measured C2 voltage
  input  sample_t v2ref_i,   // desired C2 voltage
  output sample_t out1_o,    // m1, for the S1 cell
  output sample_t out2_o,    // m2, for the S2 cell
  output sample_t out3_o,    // m3, for the S3 cell
  output logic    lim_o      // a controller output is at its limit
);

  // P controller with output limiter.
  function automatic logic signed [31:0] p_ctrl(input sample_t meas, input sample_t ref_v,
                                                output logic at_lim);
    logic signed [47:0] e, prod, sh;
    logic signed [31:0] y;
    e    = 48'(meas) - 48'(ref_v);
    prod = e * 48'(KP);
    sh   = prod >>> KP_FRAC;
    if (sh > 48'(Y_LIM)) begin
      y = 32'(Y_LIM);
      at_lim = 1'b1;
    end else if (sh < -48'(Y_LIM)) begin
      y = -32'(Y_LIM);
      at_lim = 1'b1;
    end else begin
      y = 32'(sh);
      at_lim = 1'b0;
    end
    return y;
  endfunction

  logic signed [31:0] y1, y2, m;
  logic lim1, lim2;

  always_comb begin
    y1 = p_ctrl(v1_i, v1ref_i, lim1);
    y2 = p_ctrl(v2_i, v2ref_i, lim2);
    m  = 32'(v_in_i);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out1_o <= '0;
      out2_o <= '0;
      out3_o <= '0;
      lim_o  <= 1'b0;
    end else begin
      out1_o <= sat16(m + y2);
      out2_o <= sat16(m - y2 + y1);
      out3_o <= sat16(m - y1);
      lim_o  <= lim1 | lim2;
    end
  end

endmodule
