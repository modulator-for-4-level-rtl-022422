// transformation: XY (stationary two-axis) to ABC conversion of the demanded
// voltage vector.
//
// The DSP sends the inverter voltage demand as two components in the XY frame;
// this block turns them into the three phase modulation signals. It is the
// amplitude-invariant inverse Clarke transform:
//   Va = Vx
//   Vb = -Vx/2 + (sqrt(3)/2) Vy
//   Vc = -Vx/2 - (sqrt(3)/2) Vy
// sqrt(3)/2 is the Q15 constant 28378/32768; products are rounded to nearest
// and every result is saturated to the 16-bit range. The block's role and its
// port names follow the modulator structure; the exact formula, the Q15
// rounding and the saturation are this design's choices.
//
// Timing: one register stage, outputs valid 1 clk after the inputs.
module transformation
  import flc_pkg::*;
(
  input  logic    clk,
  input  logic    rst_n,
  input  sample_t vx_i,
  input  sample_t vy_i,
  output sample_t va_o,
  output sample_t vb_o,
  output sample_t vc_o
);

  localparam logic signed [31:0] K_SQRT3_2 = 32'sd28378;  // round(sqrt(3)/2 * 2^15)

  logic signed [31:0] half_x;  // -Vx/2 scaled by 2^15
  logic signed [31:0] ky;      // (sqrt(3)/2) Vy scaled by 2^15
  logic signed [31:0] b_q15, c_q15;

  always_comb begin
    half_x = -(32'(vx_i) <<< 14);
    ky     = 32'(vy_i) * K_SQRT3_2;
    b_q15  = half_x + ky + 32'sd16384;
    c_q15  = half_x - ky + 32'sd16384;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      va_o <= '0;
      vb_o <= '0;
      vc_o <= '0;
    end else begin
      va_o <= vx_i;
      vb_o <= sat16(b_q15 >>> 15);
      vc_o <= sat16(c_q15 >>> 15);
    end
  end

endmodule
