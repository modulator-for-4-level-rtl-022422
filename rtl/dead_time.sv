// dead_time: dead-time insertion for the IGBT gate signals.
//
// Behind the FPGA modulator a separate logic device adds the dead times that
// keep the two IGBTs of a complementary pair from conducting together while
// one turns off and the other turns on. Here every gate signal is treated on
// its own: a 1 reaches the output only after the input has been 1 for
// DT_CYCLES clk cycles, a 0 passes at once. When one switch of a pair turns
// off and the other turns on in the same cycle, the turning-on one therefore
// waits DT_CYCLES cycles while both are off. Pulses shorter than the dead time
// are swallowed. A pattern that turns on both switches of a pair on purpose
// (precharge) passes, delayed like any other turn-on.
//
// The role of the stage is documented; the dead-time length is not, and
// DT_CYCLES = 200 (2 us at the assumed 100 MHz clock) is this design's choice,
// as is the per-signal counter scheme.
//
// Timing: turn-off 1 clk after the input, turn-on DT_CYCLES + 1 clk after it.
module dead_time #(
  parameter int unsigned N         = 18,
  parameter int unsigned DT_CYCLES = 200
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic [N-1:0] g_i,
  output logic [N-1:0] g_o
);

  localparam int unsigned CW = $clog2(DT_CYCLES + 1) > 0 ? $clog2(DT_CYCLES + 1) : 1;

  logic [CW-1:0] cnt [N];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      g_o <= '0;
      for (int i = 0; i < N; i++) cnt[i] <= '0;
    end else begin
      for (int i = 0; i < N; i++) begin
        if (!g_i[i]) begin
          cnt[i] <= '0;
          g_o[i] <= 1'b0;
        end else if (32'(cnt[i]) >= DT_CYCLES) begin
          g_o[i] <= 1'b1;
        end else begin
          cnt[i] <= cnt[i] + 1'b1;
          g_o[i] <= 1'b0;
        end
      end
    end
  end

endmodule
