// tb_calc_unit: drives the calculation unit with random operands, random
// neighbour values and a random mix of compute, skip (+Inf) and idle
// operations, some flagged as the first element. For the operation presented
// at cycle n it expects, at cycle n + DIST_LAT + LOOP_LAT:
//   compute:  round(min(neighbours at cycle n + DIST_LAT) + round(round(x-y)^2))
//             with the minimum replaced by 0 for the first element
//   otherwise +Inf
// together with the same control word and slot number. A second unit with a
// 4-stage recurrence loop (two extra stages) must give the same results two
// cycles later.
module tb_calc_unit;
  import dtw_pkg::*;
  import fp_ref_pkg::*;

  localparam int N   = 3000;
  localparam int LAT = DIST_LAT + LOOP_LAT;

  logic     clk = 1'b0, rst_n = 1'b0;
  fp32_t    x, y, m_last, m_band, m_out, res;
  op_ctrl_t ctrl_in, res_ctrl, res_ctrl2;
  logic [4:0] slot_in, res_slot, res_slot2;
  fp32_t    res2;
  int       checks = 0, failures = 0;

  fp32_t      xs[N], ys[N], ml[N+LAT+2], mb[N+LAT+2], mo[N+LAT+2];
  op_ctrl_t   cs[N];
  logic [31:0] exp_res[N];

  calc_unit #(.SLOT_W(5)) dut (
    .clk, .rst_n, .x, .y, .ctrl_in, .slot_in,
    .mem_last(m_last), .mem_band(m_band), .mem_out(m_out),
    .res, .res_ctrl, .res_slot);

  calc_unit #(.SLOT_W(5), .LOOP_STAGES(4)) dut2 (
    .clk, .rst_n, .x, .y, .ctrl_in, .slot_in,
    .mem_last(m_last), .mem_band(m_band), .mem_out(m_out),
    .res(res2), .res_ctrl(res_ctrl2), .res_slot(res_slot2));

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic fp32_t nonneg();
    fp32_t v;
    v = ($urandom % 8 == 0) ? FP_POS_INF : rand_fp32(120, 135);
    v.sign = 1'b0;
    return v;
  endfunction

  initial begin
    real d, m;
    for (int n = 0; n < N + LAT + 2; n++) begin
      ml[n] = nonneg(); mb[n] = nonneg(); mo[n] = nonneg();
    end
    for (int n = 0; n < N; n++) begin
      xs[n] = rand_fp32(118, 128);
      ys[n] = rand_fp32(118, 128);
      cs[n].kind   = ($urandom % 4 == 0) ? OP_INF : (($urandom % 5 == 0) ? OP_IDLE : OP_COMPUTE);
      cs[n].first  = ($urandom % 10 == 0);
      cs[n].last   = ($urandom % 2 == 0);
      cs[n].finish = ($urandom % 2 == 0);
      d = rnd_local(fp32_to_real(xs[n]) - fp32_to_real(ys[n]));
      d = rnd_local(d * d);
      m = fp32_to_real(ml[n+DIST_LAT]);
      if (fp32_to_real(mb[n+DIST_LAT]) < m) m = fp32_to_real(mb[n+DIST_LAT]);
      if (fp32_to_real(mo[n+DIST_LAT]) < m) m = fp32_to_real(mo[n+DIST_LAT]);
      if (cs[n].first) m = 0.0;
      exp_res[n] = (cs[n].kind == OP_COMPUTE) ? real_to_fp32(m + d) : 32'h7F800000;
    end
    x = '0; y = '0; ctrl_in = '0; slot_in = '0;
    m_last = ml[0]; m_band = mb[0]; m_out = mo[0];
    repeat (2) @(posedge clk);
    #1 rst_n = 1'b1;
    for (int t = 0; t < N + LAT + 2; t++) begin
      if (t < N) begin
        x = xs[t]; y = ys[t]; ctrl_in = cs[t]; slot_in = 5'(t);
      end
      m_last = ml[t]; m_band = mb[t]; m_out = mo[t];
      if (t >= LAT + 2) begin
        checks++;
        if (res2 !== exp_res[t-LAT-2] || res_ctrl2 !== cs[t-LAT-2] || res_slot2 !== 5'(t - LAT - 2)) begin
          failures++;
          $display("FAIL deep loop, op %0d: res %h expected %h", t - LAT - 2, res2, exp_res[t-LAT-2]);
        end
      end
      if (t >= LAT && t < N + LAT) begin
        checks++;
        if (res !== exp_res[t-LAT] || res_ctrl !== cs[t-LAT] || res_slot !== 5'(t - LAT)) begin
          failures++;
          $display("FAIL op %0d: res %h expected %h ctrl %h/%h slot %0d",
                   t - LAT, res, exp_res[t-LAT], res_ctrl, cs[t-LAT], res_slot);
        end
      end
      @(posedge clk);
      #1;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic real rnd_local(input real v);
    return fp32_to_real(real_to_fp32(v));
  endfunction
endmodule
