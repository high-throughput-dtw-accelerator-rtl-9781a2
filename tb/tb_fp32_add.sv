// tb_fp32_add: self-checking testbench of the single-precision adder.
// Random normal operands of mixed signs and exponents, added and subtracted,
// are compared with the double-precision sum rounded to single precision.
// When the exponents differ by more than 28 bits the double-precision sum can
// itself be rounded, so there one unit in the last place is accepted. Special
// values (zero, +Inf, Inf - Inf, exact cancellation) are checked directly.
module tb_fp32_add;
  import dtw_pkg::*;
  import fp_ref_pkg::*;

  fp32_t a, b, y;
  logic  sub;
  int    checks = 0, failures = 0;

  fp32_add dut (.a(a), .b(b), .sub(sub), .y(y));

  task automatic check_exact(input logic [31:0] exp_v, input string what);
    #1;
    checks++;
    if (y !== exp_v) begin
      failures++;
      $display("FAIL %s: a=%h b=%h sub=%0b got %h expected %h", what, a, b, sub, y, exp_v);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [31:0] ref_v;
    int ed;
    real ra, rb;
    for (int n = 0; n < 4000; n++) begin
      a   = rand_fp32(100, 150);
      b   = (n % 4 == 0) ? rand_fp32(100, 150) : rand_fp32(int'(a.exp) - 3 < 1 ? 1 : int'(a.exp) - 3, int'(a.exp) + 3 > 254 ? 254 : int'(a.exp) + 3);
      if (n % 7 == 0) b = {~a.sign, a.exp, a.man ^ 23'h1};
      sub = n[0];
      ra  = fp32_to_real(a);
      rb  = fp32_to_real(b);
      ref_v = real_to_fp32(sub ? ra - rb : ra + rb);
      #1;
      checks++;
      ed = int'(a.exp) - int'(b.exp);
      if (ed < 0) ed = -ed;
      if (ed <= 28 ? (y !== ref_v)
                   : ((y[31:23] !== ref_v[31:23]) ||
                      ((y[22:0] - ref_v[22:0] != 23'd1) && (ref_v[22:0] - y[22:0] != 23'd1) && (y !== ref_v)))) begin
        failures++;
        $display("FAIL random: a=%h b=%h sub=%0b got %h expected %h", a, b, sub, y, ref_v);
      end
    end
    // Special values.
    a = 32'h3F800000; b = 32'h3F800000; sub = 1'b1; check_exact(32'h00000000, "x-x");
    a = 32'h7F800000; b = 32'h42280000; sub = 1'b0; check_exact(32'h7F800000, "inf+x");
    a = 32'h41200000; b = 32'h7F800000; sub = 1'b0; check_exact(32'h7F800000, "x+inf");
    a = 32'h7F800000; b = 32'h7F800000; sub = 1'b1; check_exact(32'h7FC00000, "inf-inf");
    a = 32'h00000000; b = 32'h40400000; sub = 1'b0; check_exact(32'h40400000, "0+x");
    a = 32'h40400000; b = 32'h00000000; sub = 1'b1; check_exact(32'h40400000, "x-0");
    a = 32'h3F800000; b = 32'h33800000; sub = 1'b0; check_exact(32'h3F800000, "tie to even down");
    a = 32'h3F800001; b = 32'h33800000; sub = 1'b0; check_exact(32'h3F800002, "tie to even up");
    a = 32'h7F7FFFFF; b = 32'h7F7FFFFF; sub = 1'b0; check_exact(32'h7F800000, "overflow");
    a = 32'h40000000; b = 32'h3F800000; sub = 1'b1; check_exact(32'h3F800000, "2-1");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
