// tb_distance_unit: streams random sample pairs into the distance unit, one
// per cycle, and checks each squared difference, DIST_LAT cycles later, bit
// for bit against (x - y)^2 evaluated in double precision and rounded to
// single precision after the subtraction and after the square. The operand
// exponents are kept close, so the double-precision difference is exact.
module tb_distance_unit;
  import dtw_pkg::*;
  import fp_ref_pkg::*;

  localparam int N = 3000;
  logic  clk = 1'b0;
  fp32_t x, y, d;
  logic [31:0] exp_q [$];
  int    checks = 0, failures = 0, cyc = 0;

  distance_unit dut (.clk(clk), .x(x), .y(y), .dist_sq(d));

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    real diff;
    for (cyc = 0; cyc < N + DIST_LAT; cyc++) begin
      x = rand_fp32(115, 130);
      y = (cyc % 10 == 0) ? x : rand_fp32(115, 130);
      diff = fp32_to_real(real_to_fp32(fp32_to_real(x) - fp32_to_real(y)));
      exp_q.push_back(real_to_fp32(diff * diff));
      @(posedge clk);
      #1;
      if (cyc >= DIST_LAT - 1) begin
        checks++;
        if (d !== exp_q[0]) begin
          failures++;
          $display("FAIL cycle %0d: got %h expected %h", cyc, d, exp_q[0]);
        end
        void'(exp_q.pop_front());
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
