// tb_minimum_unit: checks the three-input minimum on random non-negative
// single-precision values, +Inf and ties, against the smallest value found by
// comparing the decoded numbers in double precision.
module tb_minimum_unit;
  import dtw_pkg::*;
  import fp_ref_pkg::*;

  fp32_t a, b, c, m;
  int    checks = 0, failures = 0;

  minimum_unit dut (.last_v(a), .band_v(b), .out_v(c), .min_v(m));

  function automatic fp32_t pick();
    fp32_t v;
    case ($urandom % 6)
      0:       v = FP_POS_INF;
      1:       v = FP_POS_ZERO;
      default: v = rand_fp32(100, 150);
    endcase
    v.sign = 1'b0;
    return v;
  endfunction

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    real ra, rb, rc, rm;
    for (int n = 0; n < 5000; n++) begin
      a = pick(); b = pick(); c = pick();
      if (n % 9 == 1) b = a;
      if (n % 9 == 2) c = b;
      ra = fp32_to_real(a); rb = fp32_to_real(b); rc = fp32_to_real(c);
      rm = ra;
      if (rb < rm) rm = rb;
      if (rc < rm) rm = rc;
      #1;
      checks++;
      if (fp32_to_real(m) != rm) begin
        failures++;
        $display("FAIL: %h %h %h -> %h", a, b, c, m);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
