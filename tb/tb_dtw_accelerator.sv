// tb_dtw_accelerator: end-to-end test of the DTW accelerator in two
// configurations, side by side:
//   A: 4 interleaved patterns, R = 3 (initiation interval 1): one input
//      signal against 4 patterns (size 20), 4 signals against one pattern
//      (size 13), and a signal shorter than the band radius (size 2);
//   B: 1 pattern, R = 2: the non-interleaved basic architecture, where every
//      band column carries one dummy slot and Last is bypassed (size 12);
//   C: 3 patterns, R = 2, a recurrence loop of 5 stages: two dummy slots per
//      column pad the 3 patterns up to the loop depth (size 9).
// Every DTW result is checked bit-exactly and against double precision, the
// run length in cycles is checked, and every mechanism must occur at least
// once: initial fill, row start (Rx load), skipped elements, dummy slots,
// the first element, ignored start while busy.
module tb_dtw_accelerator;
  logic clk = 1'b0, rst_n = 1'b0;
  int   checks = 0, failures = 0;

  always #5 clk = ~clk;

  dtw_harness #(.PATTERNS(4), .R(3), .MAX_SIZE(40)) h_a (.clk, .rst_n);
  dtw_harness #(.PATTERNS(1), .R(2), .MAX_SIZE(16)) h_b (.clk, .rst_n);
  dtw_harness #(.PATTERNS(3), .R(2), .MAX_SIZE(16), .LOOP_STAGES(5)) h_c (.clk, .rst_n);

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic need(input string what, input int count);
    checks++;
    $display("mechanism %-22s occurred %0d times", what, count);
    if (count == 0) begin
      failures++;
      $display("FAIL: %s never happened", what);
    end
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    h_a.run(20, 1'b1, checks, failures);
    h_a.run(13, 1'b0, checks, failures);
    h_a.run(2, 1'b1, checks, failures);
    h_b.run(12, 1'b1, checks, failures);
    h_c.run(9, 1'b1, checks, failures);
    need("initial fill", h_a.n_fill + h_b.n_fill);
    need("row start / Rx load", h_a.n_rowstart + h_b.n_rowstart);
    need("skipped element", h_a.n_skip + h_b.n_skip);
    need("dummy slot", h_b.n_dummy);
    need("dummy slot, deep loop (C)", h_c.n_dummy);
    need("Last bypass (B)", h_b.n_compute);
    need("first element", h_a.n_first + h_b.n_first);
    need("computed element", h_a.n_compute);
    need("start while busy", h_a.n_ignored_start + h_b.n_ignored_start);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
