// register_in: input register of the modulator.
//
// The DSP writes fresh data and then raises the synchronisation strobe syn_D;
// on each rising edge of syn_D the block copies all its 14 inputs to its outputs
// at once, so the rest of the modulator always sees one consistent set: the two
// components of the demanded voltage vector (Vx, Vy), the measured voltages of
// the two flying capacitors of each phase (V1, V2) and their desired values
// (V1*, V2*). That latch-on-syn_D behaviour is the documented function.
//
// This design's own choices: syn_D comes from another chip, so it passes a
// two-flop synchroniser and the edge is detected in the clk domain; the data
// inputs are assumed stable from before the edge until the copy is done (the
// DSP holds the bus while the strobe is high). Outputs change 3 clk cycles after
// syn_D rises (2 synchroniser flops + the output register). Reset clears all
// outputs to zero. upd_o pulses for one cycle when the outputs took new values.
module register_in
  import flc_pkg::*;
(
  input  logic    clk,
  input  logic    rst_n,
  input  logic    syn_d,
  input  sample_t vx_i,
  input  sample_t vy_i,
  input  sample_t v1_i   [NPH],  // measured C1 voltage, phases a, b, c
  input  sample_t v1ref_i[NPH],  // desired C1 voltage
  input  sample_t v2_i   [NPH],  // measured C2 voltage
  input  sample_t v2ref_i[NPH],  // desired C2 voltage
  output sample_t vx_o,
  output sample_t vy_o,
  output sample_t v1_o   [NPH],
  output sample_t v1ref_o[NPH],
  output sample_t v2_o   [NPH],
  output sample_t v2ref_o[NPH],
  output logic    upd_o
);

  logic [2:0] syn_q;  // [0],[1]: synchroniser, [2]: previous value
  logic       syn_rise;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) syn_q <= '0;
    else        syn_q <= {syn_q[1:0], syn_d};
  end

  assign syn_rise = syn_q[1] & ~syn_q[2];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      vx_o  <= '0;
      vy_o  <= '0;
      upd_o <= 1'b0;
      for (int p = 0; p < NPH; p++) begin
        v1_o[p]    <= '0;
        v1ref_o[p] <= '0;
        v2_o[p]    <= '0;
        v2ref_o[p] <= '0;
      end
    end else begin
      upd_o <= syn_rise;
      if (syn_rise) begin
        vx_o <= vx_i;
        vy_o <= vy_i;
        for (int p = 0; p < NPH; p++) begin
          v1_o[p]    <= v1_i[p];
          v1ref_o[p] <= v1ref_i[p];
          v2_o[p]    <= v2_i[p];
          v2ref_o[p] <= v2ref_i[p];
        end
      end
    end
  end

endmodule
