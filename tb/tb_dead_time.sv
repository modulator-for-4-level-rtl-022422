// tb_dead_time: self-checking test of the dead-time stage.
// A reference model counts, for each signal, how many consecutive clk cycles
// the input has been 1; the output must be 1 exactly when that run is longer
// than DT_CYCLES at the previous edge. Random inputs with mixed pulse lengths,
// plus an explicit complementary pair transition in which both outputs must
// be 0 for DT_CYCLES cycles.
module tb_dead_time;
  localparam int N = 6;
  localparam int DT = 7;

  logic clk = 1'b0, rst_n = 1'b0;
  logic [N-1:0] gi, go;
  int run[N];
  int checks = 0, failures = 0;

  dead_time #(.N(N), .DT_CYCLES(DT)) dut (.clk, .rst_n, .g_i(gi), .g_o(go));

  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int gap;
    gi = '0;
    foreach (run[i]) run[i] = 0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1'b1;
    for (int it = 0; it < 20000; it++) begin
      // slow random: each bit toggles with probability 1/(1+r)
      for (int i = 0; i < N; i++)
        if ($urandom_range(0, (it / 2000) % 4 == 0 ? 2 : 12) == 0) gi[i] = ~gi[i];
      @(posedge clk);
      for (int i = 0; i < N; i++) run[i] = gi[i] ? run[i] + 1 : 0;
      #1;
      for (int i = 0; i < N; i++) begin
        logic e;
        e = run[i] > DT;
        checks++;
        if (go[i] != e) begin
          failures++;
          $display("FAIL bit %0d run %0d got %b", i, run[i], go[i]);
        end
      end
    end
    // complementary pair on bits 0 (upper) and 1 (lower)
    gi = 6'b000001;
    repeat (DT + 5) @(posedge clk);
    #1 gi = 6'b000010;
    gap = 0;
    for (int c = 0; c < DT + 5; c++) begin
      @(posedge clk); #1;
      if (go[1:0] == 2'b00) gap++;
    end
    checks++;
    if (gap != DT) begin failures++; $display("FAIL dead gap %0d expected %0d", gap, DT); end
    checks++;
    if (go[1:0] != 2'b10) begin failures++; $display("FAIL final pair state %b", go[1:0]); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
