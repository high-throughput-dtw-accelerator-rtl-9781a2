// tb_prev_result_memory: feeds a numbered sequence into two previous-result
// memories, one with R=2 and 5 slots (Last holds 3 entries) and one with R=1
// and 2 slots (Last empty, bypass), and checks that the three taps return the
// values written SLOTS, (2R+1)*SLOTS and (2R+2)*SLOTS issue cycles earlier,
// counting the LOOP_LAT cycles the adder output already lags its issue cycle.
module tb_prev_result_memory;
  import dtw_pkg::*;

  logic  clk = 1'b0;
  fp32_t din;
  fp32_t a_last, a_band, a_out, b_last, b_band, b_out;
  int    checks = 0, failures = 0;

  prev_result_memory #(.R(2), .SLOTS(5), .LOOP_DLY(LOOP_LAT)) dut_a (
    .clk, .din, .last_o(a_last), .band_o(a_band), .out_o(a_out));
  prev_result_memory #(.R(1), .SLOTS(LOOP_LAT), .LOOP_DLY(LOOP_LAT)) dut_b (
    .clk, .din, .last_o(b_last), .band_o(b_band), .out_o(b_out));

  always #5 clk = ~clk;

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // At cycle t, din carries the value of the operation issued at t - LOOP_LAT;
  // value of issue cycle u is 1000 + u.
  task automatic check(input fp32_t got, input int t, input int age, input string what);
    int u;
    u = t - age;
    if (u >= 0) begin
      checks++;
      if (got !== fp32_t'(32'(1000 + u))) begin
        failures++;
        $display("FAIL %s at %0d: got %0d expected %0d", what, t, got, 1000 + u);
      end
    end
  endtask

  initial begin
    for (int t = LOOP_LAT; t < 400; t++) begin
      din = fp32_t'(32'(1000 + t - LOOP_LAT));
      #1;
      // t counts issue cycles from 0 (din holds t - LOOP_LAT).
      check(a_last, t, 5, "A last");
      check(a_band, t, 5 * 5, "A band");
      check(a_out,  t, 6 * 5, "A out");
      check(b_last, t, 2, "B last");
      check(b_band, t, 3 * 2, "B band");
      check(b_out,  t, 4 * 2, "B out");
      @(posedge clk);
      #1;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
