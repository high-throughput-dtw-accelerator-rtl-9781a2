// tb_dtw_controller: compares the operation stream of two controllers with a
// model written as nested loops over rows, columns and slots.
//   A: 3 patterns, R=2, two runs of size 6 and 1 (size below R: most of the
//      band falls outside the matrix);
//   B: 1 pattern, R=1, size 4: one dummy slot per column (SLOTS = LOOP_LAT).
// Each cycle checks the operation kind, the first/last/finish flags, the read
// enables and indices and the slot, and each run's length in cycles.
module tb_dtw_controller;
  import dtw_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0;
  int   checks = 0, failures = 0;

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---- instance A
  logic       a_start, a_active, a_xen, a_yen;
  logic [3:0] a_size, a_xidx, a_yidx;
  logic [1:0] a_slot;
  op_ctrl_t   a_op;
  dtw_controller #(.PATTERNS(3), .R(2), .MAX_SIZE(10)) dut_a (
    .clk, .rst_n, .start(a_start), .size(a_size), .active(a_active),
    .x_rd_en(a_xen), .x_rd_idx(a_xidx), .y_rd_en(a_yen), .y_rd_idx(a_yidx),
    .slot(a_slot), .op(a_op));

  // ---- instance B
  logic       b_start, b_active, b_xen, b_yen;
  logic [2:0] b_size, b_xidx, b_yidx;
  logic       b_slot;
  op_ctrl_t   b_op;
  dtw_controller #(.PATTERNS(1), .R(1), .MAX_SIZE(4)) dut_b (
    .clk, .rst_n, .start(b_start), .size(b_size), .active(b_active),
    .x_rd_en(b_xen), .x_rd_idx(b_xidx), .y_rd_en(b_yen), .y_rd_idx(b_yidx),
    .slot(b_slot), .op(b_op));

  // Expected operation for row r (0 = fill), column c, slot s.
  task automatic expect_op(input int P, input int R, input int n, input int r, input int c,
                           input int s, input int S,
                           output op_ctrl_t op, output bit xen, output bit yen,
                           output int xi, output int yj);
    int i, j;
    op  = '{kind: OP_IDLE, first: 1'b0, last: 1'b0, finish: 1'b0};
    xen = 0; yen = 0; xi = -1; yj = -1;
    op.finish = (r == n) && (c == 2 * R + 1) && (s == S - 1);
    if (s >= P) return;
    op.kind = OP_INF;
    if (r == 0) return;
    i = r - 1;
    if (c == 0) begin
      xen = 1; xi = i;
      return;
    end
    j = i - R + (c - 1);
    if (j < 0 || j >= n) return;
    yen = 1; yj = j;
    op.kind  = OP_COMPUTE;
    op.first = (i == 0 && j == 0);
    op.last  = (i == n - 1 && j == n - 1);
  endtask

  task automatic run_a(input int n);
    op_ctrl_t e; bit xe, ye; int xi, yj, cycles;
    a_start = 1; a_size = 4'(n);
    @(posedge clk); #1 a_start = 0;
    cycles = 0;
    for (int r = 0; r <= n; r++)
      for (int c = 0; c < 2 * 2 + 2; c++)
        for (int s = 0; s < 3; s++) begin
          expect_op(3, 2, n, r, c, s, 3, e, xe, ye, xi, yj);
          checks++;
          if (!a_active || a_op !== e || a_xen !== xe || a_yen !== ye || a_slot !== 2'(s) ||
              (xe && a_xidx !== 4'(xi)) || (ye && a_yidx !== 4'(yj))) begin
            failures++;
            $display("FAIL A n=%0d r=%0d c=%0d s=%0d: op %h exp %h x %0b/%0d y %0b/%0d",
                     n, r, c, s, a_op, e, a_xen, a_xidx, a_yen, a_yidx);
          end
          cycles++;
          @(posedge clk); #1;
        end
    checks++;
    if (a_active || cycles != (n + 1) * 6 * 3) begin
      failures++;
      $display("FAIL A run length");
    end
  endtask

  initial begin
    op_ctrl_t e; bit xe, ye; int xi, yj;
    a_start = 0; b_start = 0; a_size = 0; b_size = 0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    @(posedge clk); #1;
    checks++;
    if (a_active || a_op.kind !== OP_IDLE || a_xen || a_yen) begin
      failures++;
      $display("FAIL: controller not idle after reset");
    end
    run_a(6);
    repeat (3) @(posedge clk); #1;
    run_a(1);
    // B
    b_start = 1; b_size = 3'd4;
    @(posedge clk); #1 b_start = 0;
    for (int r = 0; r <= 4; r++)
      for (int c = 0; c < 4; c++)
        for (int s = 0; s < 2; s++) begin
          expect_op(1, 1, 4, r, c, s, 2, e, xe, ye, xi, yj);
          checks++;
          if (!b_active || b_op !== e || b_xen !== xe || b_yen !== ye || b_slot !== 1'(s) ||
              (xe && b_xidx !== 3'(xi)) || (ye && b_yidx !== 3'(yj))) begin
            failures++;
            $display("FAIL B r=%0d c=%0d s=%0d: op %h exp %h", r, c, s, b_op, e);
          end
          @(posedge clk); #1;
        end
    checks++;
    if (b_active) begin
      failures++;
      $display("FAIL B still active");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
