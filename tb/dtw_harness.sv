// dtw_harness: one dtw_accelerator with a model of the signal and pattern
// storage around it (synchronous read, one cycle latency), and a task that
// performs one complete run and checks it:
//   * every pattern slot reports exactly one result, bit-exact with a
//     single-precision model of the banded DTW, and within 0.01 % of the same
//     DTW evaluated in double precision;
//   * done arrives (size+1)*(2R+2)*SLOTS + 1 + DIST_LAT + LOOP_STAGES + 1 cycles
//     after the cycle in which start is taken, and busy is high in between;
//   * a second start while busy is ignored.
// It also counts how often each mechanism of the design occurred: initial
// fill, row start with Rx load, skipped out-of-matrix elements, dummy slots,
// the first element, and computed elements.
// same_x = 1 compares one input signal with all patterns; same_x = 0 compares
// a different signal in each slot with one pattern.
module dtw_harness
  import dtw_pkg::*;
  import fp_ref_pkg::*;
  import dtw_ref_pkg::*;
#(
  parameter int unsigned PATTERNS = 4,
  parameter int unsigned R        = 3,
  parameter int unsigned MAX_SIZE = 40,
  parameter int unsigned LOOP_STAGES = LOOP_LAT
) (
  input logic clk,
  input logic rst_n
);

  localparam int unsigned SLOTS  = (PATTERNS > LOOP_STAGES) ? PATTERNS : LOOP_STAGES;
  localparam int unsigned SLOT_W = (SLOTS > 1) ? $clog2(SLOTS) : 1;
  localparam int unsigned IDX_W  = $clog2(MAX_SIZE + 1);

  logic              start = 1'b0, busy, done;
  logic [IDX_W-1:0]  size = '0;
  logic              x_rd_en, y_rd_en, res_valid;
  logic [SLOT_W-1:0] x_rd_slot, y_rd_slot, res_slot;
  logic [IDX_W-1:0]  x_rd_idx, y_rd_idx;
  fp32_t             x_rd_data, y_rd_data, res_value;

  dtw_accelerator #(.PATTERNS(PATTERNS), .R(R), .MAX_SIZE(MAX_SIZE), .LOOP_STAGES(LOOP_STAGES)) dut (
    .clk, .rst_n, .start, .size, .busy, .done,
    .x_rd_en, .x_rd_slot, .x_rd_idx, .x_rd_data,
    .y_rd_en, .y_rd_slot, .y_rd_idx, .y_rd_data,
    .res_valid, .res_slot, .res_value);

  // Signal and pattern storage model.
  logic [31:0] xmem [PATTERNS][MAX_SIZE];
  logic [31:0] ymem [PATTERNS][MAX_SIZE];

  always_ff @(posedge clk) begin
    x_rd_data <= (x_rd_en && 32'(x_rd_slot) < PATTERNS && 32'(x_rd_idx) < MAX_SIZE) ? xmem[x_rd_slot][x_rd_idx] : 32'hDEADBEEF;
    y_rd_data <= (y_rd_en && 32'(y_rd_slot) < PATTERNS && 32'(y_rd_idx) < MAX_SIZE) ? ymem[y_rd_slot][y_rd_idx] : 32'hDEADBEEF;
  end

  // Mechanism counters.
  int n_fill = 0, n_rowstart = 0, n_skip = 0, n_dummy = 0, n_first = 0, n_compute = 0;
  int n_ignored_start = 0;

  always_ff @(posedge clk) begin
    if (dut.u_ctrl.active) begin
      if (dut.op.kind == OP_IDLE) n_dummy <= n_dummy + 1;
      if (dut.op.kind == OP_INF && dut.u_ctrl.row_q == '0) n_fill <= n_fill + 1;
      if (dut.x_rd_en) n_rowstart <= n_rowstart + 1;
      if (dut.op.kind == OP_INF && dut.u_ctrl.row_q != '0 && dut.u_ctrl.col_q != '0) n_skip <= n_skip + 1;
      if (dut.op.first) n_first <= n_first + 1;
      if (dut.op.kind == OP_COMPUTE) n_compute <= n_compute + 1;
    end
  end

  function automatic logic [31:0] rand_sample();
    return real_to_fp32(real'(int'($urandom % 20001) - 10000) / 10000.0);
  endfunction

  task automatic run(input int n, input bit same_x, inout int checks, inout int failures);
    logic [31:0] xs [$], ys [$];
    logic [31:0] exp_s [PATTERNS];
    real         exp_d [PATTERNS];
    int          seen  [PATTERNS];
    int          cycles, expected_cycles;
    real         got, rel;
    // data
    for (int i = 0; i < n; i++) begin
      xmem[0][i] = rand_sample();
      ymem[0][i] = rand_sample();
    end
    for (int p = 1; p < PATTERNS; p++)
      for (int i = 0; i < n; i++) begin
        xmem[p][i] = same_x ? xmem[0][i] : rand_sample();
        ymem[p][i] = same_x ? rand_sample() : ymem[0][i];
      end
    for (int p = 0; p < PATTERNS; p++) begin
      xs = {}; ys = {};
      for (int i = 0; i < n; i++) begin
        xs.push_back(xmem[p][i]);
        ys.push_back(ymem[p][i]);
      end
      exp_s[p] = dtw_single(xs, ys, n, R);
      exp_d[p] = dtw_double(xs, ys, n, R);
      seen[p]  = 0;
    end
    expected_cycles = (n + 1) * (2 * R + 2) * SLOTS + 1 + DIST_LAT + LOOP_STAGES + 1;
    // start
    @(negedge clk);
    start = 1'b1;
    size  = IDX_W'(n);
    @(negedge clk);
    start = 1'b0;
    cycles = 1;
    // a start while busy must be ignored
    repeat (3) @(negedge clk);
    cycles += 3;
    start = 1'b1;
    n_ignored_start++;
    @(negedge clk);
    cycles++;
    start = 1'b0;
    while (!done) begin
      checks++;
      if (!busy) begin
        failures++;
        $display("FAIL: busy low during a run");
      end
      if (res_valid) begin
        seen[res_slot]++;
        checks++;
        if (res_value !== exp_s[res_slot]) begin
          failures++;
          $display("FAIL slot %0d (n=%0d): got %h expected %h", res_slot, n, res_value, exp_s[res_slot]);
        end
        got = fp32_to_real(res_value);
        rel = (exp_d[res_slot] == 0.0) ? got : (got - exp_d[res_slot]) / exp_d[res_slot];
        if (rel < 0) rel = -rel;
        checks++;
        if (rel > 1.0e-4) begin
          failures++;
          $display("FAIL slot %0d: relative error %g against double precision", res_slot, rel);
        end
      end
      @(negedge clk);
      cycles++;
    end
    checks++;
    if (cycles != expected_cycles) begin
      failures++;
      $display("FAIL: run of size %0d took %0d cycles, expected %0d", n, cycles, expected_cycles);
    end
    for (int p = 0; p < PATTERNS; p++) begin
      checks++;
      if (seen[p] != 1) begin
        failures++;
        $display("FAIL: slot %0d reported %0d results", p, seen[p]);
      end
    end
    @(negedge clk);
    checks++;
    if (busy || done) begin
      failures++;
      $display("FAIL: busy or done after the run");
    end
    $display("run P=%0d R=%0d loop=%0d size=%0d: %0d cycles", PATTERNS, R, LOOP_STAGES, n, cycles);
  endtask

endmodule
