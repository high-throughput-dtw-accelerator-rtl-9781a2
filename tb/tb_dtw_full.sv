// tb_dtw_full: one complete run of the accelerator with every parameter at
// its default (32 interleaved patterns, band radius 16, signals of up to 5000
// samples), on signals of the maximum length: one random input signal
// against 32 random patterns. Each result is checked bit-exactly against a
// single-precision model and within 0.01 % of a double-precision DTW, and the
// run must take (size+1)*(2R+2)*32 + 7 cycles.
module tb_dtw_full;
  import dtw_pkg::*;
  import fp_ref_pkg::*;
  import dtw_ref_pkg::*;

  localparam int P = 32, RAD = 16, N = 5000;

  logic        clk = 1'b0, rst_n = 1'b0;
  logic        start = 1'b0, busy, done;
  logic [12:0] size = '0;
  logic        x_rd_en, y_rd_en, res_valid;
  logic [4:0]  x_rd_slot, y_rd_slot, res_slot;
  logic [12:0] x_rd_idx, y_rd_idx;
  fp32_t       x_rd_data, y_rd_data, res_value;
  int          checks = 0, failures = 0;

  dtw_accelerator dut (
    .clk, .rst_n, .start, .size, .busy, .done,
    .x_rd_en, .x_rd_slot, .x_rd_idx, .x_rd_data,
    .y_rd_en, .y_rd_slot, .y_rd_idx, .y_rd_data,
    .res_valid, .res_slot, .res_value);

  always #5 clk = ~clk;

  logic [31:0] xmem [N];
  logic [31:0] ymem [P][N];

  always_ff @(posedge clk) begin
    x_rd_data <= xmem[x_rd_idx];
    y_rd_data <= ymem[y_rd_slot][y_rd_idx];
  end

  initial begin
    repeat (6_000_000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [31:0] rand_sample();
    return real_to_fp32(real'(int'($urandom % 20001) - 10000) / 10000.0);
  endfunction

  initial begin
    logic [31:0] xs [$], ys [$];
    logic [31:0] exp_s [P];
    real         exp_d [P];
    int          seen [P];
    int          cycles;
    real         rel;
    for (int i = 0; i < N; i++) begin
      xmem[i] = rand_sample();
      xs.push_back(xmem[i]);
    end
    for (int p = 0; p < P; p++) begin
      ys = {};
      for (int i = 0; i < N; i++) begin
        ymem[p][i] = rand_sample();
        ys.push_back(ymem[p][i]);
      end
      exp_s[p] = dtw_single(xs, ys, N, RAD);
      exp_d[p] = dtw_double(xs, ys, N, RAD);
      seen[p]  = 0;
    end
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    @(negedge clk);
    start = 1'b1;
    size  = 13'(N);
    @(negedge clk);
    start  = 1'b0;
    cycles = 1;
    while (!done) begin
      if (res_valid) begin
        seen[res_slot]++;
        checks += 2;
        if (res_value !== exp_s[res_slot]) begin
          failures++;
          $display("FAIL slot %0d: got %h expected %h", res_slot, res_value, exp_s[res_slot]);
        end
        rel = (fp32_to_real(res_value) - exp_d[res_slot]) / exp_d[res_slot];
        if (rel < 0) rel = -rel;
        if (rel > 1.0e-4) begin
          failures++;
          $display("FAIL slot %0d: relative error %g", res_slot, rel);
        end
      end
      @(negedge clk);
      cycles++;
    end
    checks++;
    if (cycles != (N + 1) * (2 * RAD + 2) * P + 7) begin
      failures++;
      $display("FAIL: %0d cycles, expected %0d", cycles, (N + 1) * (2 * RAD + 2) * P + 7);
    end
    for (int p = 0; p < P; p++) begin
      checks++;
      if (seen[p] != 1) begin
        failures++;
        $display("FAIL: slot %0d reported %0d results", p, seen[p]);
      end
    end
    $display("full-size run: %0d cycles, DTW(slot 0) = %h", cycles, exp_s[0]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
