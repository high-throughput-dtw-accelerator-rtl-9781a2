// dtw_ref_pkg: reference banded DTW for the testbenches, written from the
// recurrence w(i,j) = min(w(i,j-1), w(i-1,j), w(i-1,j-1)) + (x_i - y_j)^2
// with w(0,0) = (x_0 - y_0)^2, a Sakoe-Chiba band |i - j| <= R and infinity
// outside the band. It keeps two rows of the matrix.
//   dtw_single: every operation rounded to single precision as the hardware
//               does (bit-exact expectation);
//   dtw_double: plain double precision (the accuracy reference).
package dtw_ref_pkg;
  import fp_ref_pkg::*;

  function automatic real rnd(input real v);
    return fp32_to_real(real_to_fp32(v));
  endfunction

  function automatic real inf_r();
    return $bitstoreal(64'h7FF0000000000000);
  endfunction

  function automatic real dtw_core(input logic [31:0] xs[$], input logic [31:0] ys[$],
                                   input int n, input int r, input bit single);
    real prev[], cur[];
    real d, m;
    int  jlo, jhi;
    prev = new[n];
    cur  = new[n];
    foreach (prev[k]) prev[k] = inf_r();
    for (int i = 0; i < n; i++) begin
      foreach (cur[k]) cur[k] = inf_r();
      jlo = (i - r < 0) ? 0 : i - r;
      jhi = (i + r > n - 1) ? n - 1 : i + r;
      for (int j = jlo; j <= jhi; j++) begin
        d = fp32_to_real(xs[i]) - fp32_to_real(ys[j]);
        if (single) begin
          d = rnd(d);
          d = rnd(d * d);
        end else begin
          d = d * d;
        end
        if (i == 0 && j == 0) m = 0.0;
        else begin
          m = inf_r();
          if (j > 0 && cur[j-1] < m) m = cur[j-1];
          if (i > 0 && prev[j] < m) m = prev[j];
          if (i > 0 && j > 0 && prev[j-1] < m) m = prev[j-1];
        end
        cur[j] = single ? rnd(m + d) : m + d;
      end
      prev = cur;
      cur  = new[n];
    end
    return prev[n-1];
  endfunction

  function automatic logic [31:0] dtw_single(input logic [31:0] xs[$], input logic [31:0] ys[$],
                                             input int n, input int r);
    return real_to_fp32(dtw_core(xs, ys, n, r, 1'b1));
  endfunction

  function automatic real dtw_double(input logic [31:0] xs[$], input logic [31:0] ys[$],
                                     input int n, input int r);
    return dtw_core(xs, ys, n, r, 1'b0);
  endfunction

endpackage
