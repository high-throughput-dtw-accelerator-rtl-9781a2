// distance_unit: pipelined squared Euclidean distance Dist(x, y) = (x - y)^2
// between one sample of the input signal and one sample of a pattern, in
// single precision.
//
// Three register stages: the operands are registered, then the difference
// (fp32_add in subtract mode), then its square (fp32_mul with both inputs the
// same difference). A new pair is accepted every cycle; the distance of the
// pair presented at cycle t is on `dist_sq` during cycle t + DIST_LAT (3). The
// unit is fed continuously; there is no valid signal, the control word that
// says what a slot means travels beside it in calc_unit.
//
// The squared Euclidean distance is the measure the design is defined with;
// the split into three stages is this design's choice.
module distance_unit
  import dtw_pkg::*;
(
  input  logic  clk,
  input  fp32_t x,
  input  fp32_t y,
  output fp32_t dist_sq
);

  fp32_t x_q, y_q, diff, diff_q, sq, sq_q;

  fp32_add u_sub (.a(x_q), .b(y_q), .sub(1'b1), .y(diff));
  fp32_mul u_sq  (.a(diff_q), .b(diff_q), .y(sq));

  always_ff @(posedge clk) begin
    x_q    <= x;
    y_q    <= y;
    diff_q <= diff;
    sq_q   <= sq;
  end

  assign dist_sq = sq_q;

endmodule
