// tb_fp32_mul: self-checking testbench of the single-precision multiplier.
// The product of two single-precision numbers is exact in double precision,
// so the reference is the double product rounded once to single precision,
// and every result must match it bit for bit. A third of the operands have short
// significands so that exact ties occur. Special values are checked too.
module tb_fp32_mul;
  import dtw_pkg::*;
  import fp_ref_pkg::*;

  fp32_t a, b, y;
  int    checks = 0, failures = 0;

  fp32_mul dut (.a(a), .b(b), .y(y));

  task automatic check_exact(input logic [31:0] exp_v, input string what);
    #1;
    checks++;
    if (y !== exp_v) begin
      failures++;
      $display("FAIL %s: a=%h b=%h got %h expected %h", what, a, b, y, exp_v);
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
    for (int n = 0; n < 4000; n++) begin
      a = rand_fp32(70, 180);
      b = (n % 2 == 0) ? a : rand_fp32(70, 180);
      // short significands: the product often ends exactly half-way
      if (n % 3 == 0) begin
        a.man[10:0] = '0;
        b.man[10:0] = '0;
      end
      check_exact(real_to_fp32(fp32_to_real(a) * fp32_to_real(b)), "random");
    end
    a = 32'h3F800800; b = 32'h3F800800; check_exact(32'h3F801000, "tie to even");
    a = 32'h7F800000; b = 32'h40000000; check_exact(32'h7F800000, "inf*x");
    a = 32'h7F800000; b = 32'h00000000; check_exact(32'h7FC00000, "inf*0");
    a = 32'h00000000; b = 32'hC0000000; check_exact(32'h80000000, "0*-x");
    a = 32'h7F000000; b = 32'h7F000000; check_exact(32'h7F800000, "overflow");
    a = 32'h00800000; b = 32'h00800000; check_exact(32'h00000000, "underflow");
    a = 32'hC0400000; b = 32'hC0400000; check_exact(32'h41100000, "(-3)^2");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
