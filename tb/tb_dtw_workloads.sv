// tb_dtw_workloads: runs the configurations of the published evaluation of
// this architecture, each checked end to end by dtw_harness (bit-exact
// results, double-precision accuracy, run length):
//   signal sizes 100 and 500 with R = 16 and 32 patterns (sizes 2500 and
//   5000 need the defaults only and are left to tb_dtw_full);
//   band radius 8, 32 and 64 with 32 patterns;
//   4, 8, 16 and 24 interleaved patterns with R = 16 and a recurrence loop
//   of 14 stages, the loop depth of the published 3 ns implementation: 4 and
//   8 patterns are padded with dummy slots to 14, 16 and 24 run at one
//   element per cycle.
// The radius and pattern sweeps use signals of 200 samples instead of the
// 2500 of the published sweep, to keep the simulation short; the run length
// scales linearly with the size.
module tb_dtw_workloads;
  logic clk = 1'b0, rst_n = 1'b0;
  int   checks = 0, failures = 0;

  always #5 clk = ~clk;

  dtw_harness #(.PATTERNS(32), .R(16), .MAX_SIZE(5000)) h_size (.clk, .rst_n);
  dtw_harness #(.PATTERNS(32), .R(8),  .MAX_SIZE(200))  h_r8   (.clk, .rst_n);
  dtw_harness #(.PATTERNS(32), .R(32), .MAX_SIZE(200))  h_r32  (.clk, .rst_n);
  dtw_harness #(.PATTERNS(32), .R(64), .MAX_SIZE(200))  h_r64  (.clk, .rst_n);
  dtw_harness #(.PATTERNS(4),  .R(16), .MAX_SIZE(200), .LOOP_STAGES(14)) h_p4  (.clk, .rst_n);
  dtw_harness #(.PATTERNS(8),  .R(16), .MAX_SIZE(200), .LOOP_STAGES(14)) h_p8  (.clk, .rst_n);
  dtw_harness #(.PATTERNS(16), .R(16), .MAX_SIZE(200), .LOOP_STAGES(14)) h_p16 (.clk, .rst_n);
  dtw_harness #(.PATTERNS(24), .R(16), .MAX_SIZE(200), .LOOP_STAGES(14)) h_p24 (.clk, .rst_n);

  initial begin
    repeat (4_000_000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    fork
      begin
        h_size.run(100, 1'b1, checks, failures);
        h_size.run(500, 1'b1, checks, failures);
      end
      h_r8.run(200, 1'b1, checks, failures);
      h_r32.run(200, 1'b1, checks, failures);
      h_r64.run(200, 1'b1, checks, failures);
      h_p4.run(200, 1'b1, checks, failures);
      h_p8.run(200, 1'b1, checks, failures);
      h_p16.run(200, 1'b1, checks, failures);
      h_p24.run(200, 1'b1, checks, failures);
    join
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
