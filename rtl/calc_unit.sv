// calc_unit: the pipelined Calculation Unit. It evaluates the DTW recurrence
//
//   w(i,j) = min(w(i,j-1), w(i-1,j), w(i-1,j-1)) + (x_i - y_j)^2
//
// for one matrix element per clock cycle, each cycle belonging to one of the
// interleaved computations (an issue slot).
//
// Pipeline (cycle numbers relative to the cycle t0 the operands x, y and the
// control word are presented):
//   t0 .. t0+2  distance unit (operands, difference, square registered)
//   t0+3        "issue": the three neighbours from the previous-result memory
//               are compared in the minimum unit; minimum, distance and
//               control are registered
//   t0+4        single-precision add, registered
//   t0+5        result on `res`, pushed into the previous-result memory
// Issue to result is LOOP_STAGES cycles (default LOOP_LAT = 2): this is the
// recurrence loop, and it is why consecutive elements of one DTW must be at
// least LOOP_STAGES cycles apart. The distance stages lie outside the loop.
// LOOP_STAGES above 2 adds plain register stages after the adder, standing
// for the deeper pipeline a faster clock target needs; the results then come
// LOOP_STAGES - 2 cycles later.
//
// Iterations that compute nothing (control kind OP_INF or OP_IDLE) produce
// +Inf; the element w(0,0) (control flag `first`) takes 0 as its minimum, so
// it equals its own distance. The control word and slot number come out with
// the result. The control pipeline is reset so no stale flag survives a reset.
// The structure (minimum unit and distance unit side by side, feeding an
// adder, all pipelined) follows the design; the stage count is this design's.
module calc_unit
  import dtw_pkg::*;
#(
  parameter int unsigned SLOT_W      = 5,
  parameter int unsigned LOOP_STAGES = LOOP_LAT
) (
  input  logic              clk,
  input  logic              rst_n,
  // operands and control, cycle t0
  input  fp32_t             x,
  input  fp32_t             y,
  input  op_ctrl_t          ctrl_in,
  input  logic [SLOT_W-1:0] slot_in,
  // neighbours from the previous-result memory, read at issue (t0+3)
  input  fp32_t             mem_last,
  input  fp32_t             mem_band,
  input  fp32_t             mem_out,
  // result, cycle t0 + DIST_LAT + LOOP_STAGES
  output fp32_t             res,
  output op_ctrl_t          res_ctrl,
  output logic [SLOT_W-1:0] res_slot
);

  localparam op_ctrl_t CTRL_NONE = '{kind: OP_IDLE, first: 1'b0, last: 1'b0, finish: 1'b0};

  fp32_t             dist_v;
  op_ctrl_t          ctrl_d [DIST_LAT];
  logic [SLOT_W-1:0] slot_d [DIST_LAT];

  distance_unit u_dist (.clk(clk), .x(x), .y(y), .dist_sq(dist_v));

  // Control and slot travel beside the distance pipeline.
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int k = 0; k < DIST_LAT; k++) begin
        ctrl_d[k] <= CTRL_NONE;
        slot_d[k] <= '0;
      end
    end else begin
      ctrl_d[0] <= ctrl_in;
      slot_d[0] <= slot_in;
      for (int k = 1; k < DIST_LAT; k++) begin
        ctrl_d[k] <= ctrl_d[k-1];
        slot_d[k] <= slot_d[k-1];
      end
    end
  end

  // Issue stage: minimum of the three neighbours.
  op_ctrl_t          iss_ctrl;
  fp32_t             min_raw, min_sel;
  fp32_t             min_q, dist_q;
  op_ctrl_t          ctrl_a;
  logic [SLOT_W-1:0] slot_a;

  assign iss_ctrl = ctrl_d[DIST_LAT-1];

  minimum_unit u_min (.last_v(mem_last), .band_v(mem_band), .out_v(mem_out), .min_v(min_raw));

  assign min_sel = iss_ctrl.first ? FP_POS_ZERO : min_raw;

  always_ff @(posedge clk) begin
    min_q  <= min_sel;
    dist_q <= dist_v;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      ctrl_a <= CTRL_NONE;
      slot_a <= '0;
    end else begin
      ctrl_a <= iss_ctrl;
      slot_a <= slot_d[DIST_LAT-1];
    end
  end

  // Add stage.
  fp32_t             sum, res_q;
  op_ctrl_t          res_ctrl_q;
  logic [SLOT_W-1:0] res_slot_q;

  fp32_add u_add (.a(min_q), .b(dist_q), .sub(1'b0), .y(sum));

  always_ff @(posedge clk) begin
    res_q <= (ctrl_a.kind == OP_COMPUTE) ? sum : FP_POS_INF;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      res_ctrl_q <= CTRL_NONE;
      res_slot_q <= '0;
    end else begin
      res_ctrl_q <= ctrl_a;
      res_slot_q <= slot_a;
    end
  end

  // Optional extra loop stages.
  localparam int unsigned EXTRA = LOOP_STAGES - 2;

  generate
    if (EXTRA == 0) begin : g_no_extra
      assign res      = res_q;
      assign res_ctrl = res_ctrl_q;
      assign res_slot = res_slot_q;
    end else begin : g_extra
      fp32_t             res_x  [EXTRA];
      op_ctrl_t          ctrl_x [EXTRA];
      logic [SLOT_W-1:0] slot_x [EXTRA];
      always_ff @(posedge clk) begin
        res_x[0] <= res_q;
        for (int k = 1; k < EXTRA; k++) res_x[k] <= res_x[k-1];
      end
      always_ff @(posedge clk or negedge rst_n) begin
        if (!rst_n) begin
          for (int k = 0; k < EXTRA; k++) begin
            ctrl_x[k] <= CTRL_NONE;
            slot_x[k] <= '0;
          end
        end else begin
          ctrl_x[0] <= res_ctrl_q;
          slot_x[0] <= res_slot_q;
          for (int k = 1; k < EXTRA; k++) begin
            ctrl_x[k] <= ctrl_x[k-1];
            slot_x[k] <= slot_x[k-1];
          end
        end
      end
      assign res      = res_x[EXTRA-1];
      assign res_ctrl = ctrl_x[EXTRA-1];
      assign res_slot = slot_x[EXTRA-1];
    end
  endgenerate

  initial assert (LOOP_STAGES >= 2) else $error("calc_unit: LOOP_STAGES must be at least 2");

endmodule
