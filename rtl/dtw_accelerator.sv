// dtw_accelerator: minimum-area Dynamic Time Warping unit with interleaving.
//
// Computes PATTERNS independent DTW distances at a time, each between an
// input signal X_p and a pattern Y_p of `size` samples, with the warping path
// held within a Sakoe-Chiba band of radius R (2R+1 elements per row) and the
// squared Euclidean distance between samples, all in IEEE-754 single
// precision. The usual use compares one input signal with PATTERNS patterns
// (X_p the same for all p); several signals against one pattern work as well.
//
// A single pipelined calculation unit computes one matrix element per cycle.
// Because each element depends on the one computed just before it in the same
// row, consecutive cycles belong to different DTWs (interleaving), so the
// recurrence loop of the unit never stalls. Only the sliding band of previous
// results is stored, in a shift register (prev_result_memory).
//
// Blocks: dtw_controller (iteration order), rx_regfile (x_i per slot),
// calc_unit (distance unit, minimum unit, adder), prev_result_memory (Last,
// Band, Output).
//
// Interface:
//   start/size     start a run of `size` (1..MAX_SIZE) samples per signal;
//                  accepted while busy is low
//   x_rd_*         read request for sample x_rd_idx of input signal x_rd_slot;
//                  x_rd_data must hold it in the next cycle (synchronous memory)
//   y_rd_*         the same for pattern y_rd_slot
//   res_valid      for one cycle per pattern: res_value is DTW(X_p, Y_p) for
//                  p = res_slot
//   done           one cycle after the run; busy falls with it
// Timing: a run takes (size+1) * (2R+2) * SLOTS cycles of issue, where
// SLOTS = max(PATTERNS, LOOP_STAGES), plus 1 + DIST_LAT + LOOP_STAGES + 1
// (7 at the default LOOP_STAGES = 2) cycles of memory read, pipeline and
// status register: done is high that many cycles after the clock edge at
// which start was taken. LOOP_STAGES sets the depth of the recurrence loop
// (minimum and add, 2 by default); a deeper loop needs more patterns, or
// dummy slots, to keep one element per cycle.
// The signal and pattern storage itself is outside this unit.
module dtw_accelerator
  import dtw_pkg::*;
#(
  parameter int unsigned PATTERNS = 32,
  parameter int unsigned R        = 16,
  parameter int unsigned MAX_SIZE = 5000,
  parameter int unsigned LOOP_STAGES = LOOP_LAT,
  localparam int unsigned SLOTS   = (PATTERNS > LOOP_STAGES) ? PATTERNS : LOOP_STAGES,
  localparam int unsigned SLOT_W  = (SLOTS > 1) ? $clog2(SLOTS) : 1,
  localparam int unsigned IDX_W   = $clog2(MAX_SIZE + 1)
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              start,
  input  logic [IDX_W-1:0]  size,
  output logic              busy,
  output logic              done,
  output logic              x_rd_en,
  output logic [SLOT_W-1:0] x_rd_slot,
  output logic [IDX_W-1:0]  x_rd_idx,
  input  fp32_t             x_rd_data,
  output logic              y_rd_en,
  output logic [SLOT_W-1:0] y_rd_slot,
  output logic [IDX_W-1:0]  y_rd_idx,
  input  fp32_t             y_rd_data,
  output logic              res_valid,
  output logic [SLOT_W-1:0] res_slot,
  output fp32_t             res_value
);

  // ---------------- controller ----------------
  logic              active;
  logic [SLOT_W-1:0] slot;
  op_ctrl_t          op;

  dtw_controller #(
    .PATTERNS(PATTERNS), .R(R), .MAX_SIZE(MAX_SIZE), .SLOTS(SLOTS),
    .SLOT_W(SLOT_W), .IDX_W(IDX_W)
  ) u_ctrl (
    .clk, .rst_n,
    .start(start && !busy), .size, .active,
    .x_rd_en, .x_rd_idx, .y_rd_en, .y_rd_idx,
    .slot, .op
  );

  assign x_rd_slot = slot;
  assign y_rd_slot = slot;

  // ---------------- memory read stage ----------------
  // The memories answer one cycle later: the operation waits one stage.
  localparam op_ctrl_t CTRL_NONE = '{kind: OP_IDLE, first: 1'b0, last: 1'b0, finish: 1'b0};
  op_ctrl_t          op_q;
  logic [SLOT_W-1:0] slot_q;
  logic              x_load_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      op_q     <= CTRL_NONE;
      slot_q   <= '0;
      x_load_q <= 1'b0;
    end else begin
      op_q     <= op;
      slot_q   <= slot;
      x_load_q <= x_rd_en;
    end
  end

  // ---------------- Rx ----------------
  fp32_t rx_val;

  rx_regfile #(.SLOTS(SLOTS), .SLOT_W(SLOT_W)) u_rx (
    .clk,
    .we(x_load_q), .waddr(slot_q), .wdata(x_rd_data),
    .raddr(slot_q), .rdata(rx_val)
  );

  // ---------------- calculation unit and previous-result memory ----------
  fp32_t             mem_last, mem_band, mem_out, res;
  op_ctrl_t          res_ctrl;
  logic [SLOT_W-1:0] res_slot_i;

  calc_unit #(.SLOT_W(SLOT_W), .LOOP_STAGES(LOOP_STAGES)) u_calc (
    .clk, .rst_n,
    .x(rx_val), .y(y_rd_data), .ctrl_in(op_q), .slot_in(slot_q),
    .mem_last, .mem_band, .mem_out,
    .res, .res_ctrl, .res_slot(res_slot_i)
  );

  prev_result_memory #(.R(R), .SLOTS(SLOTS), .LOOP_DLY(LOOP_STAGES)) u_mem (
    .clk, .din(res), .last_o(mem_last), .band_o(mem_band), .out_o(mem_out)
  );

  // ---------------- results and status ----------------
  assign res_valid = res_ctrl.last;
  assign res_slot  = res_slot_i;
  assign res_value = res;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy <= 1'b0;
      done <= 1'b0;
    end else begin
      done <= res_ctrl.finish;
      if (start && !busy) busy <= 1'b1;
      else if (res_ctrl.finish) busy <= 1'b0;
    end
  end

  // A request for data is only made while the controller runs.
  a_reads_when_active: assert property (@(posedge clk) disable iff (!rst_n)
    (x_rd_en || y_rd_en) |-> active);
  // Never both memories in one slot: a row-start reads x, an element reads y.
  a_one_read: assert property (@(posedge clk) disable iff (!rst_n)
    !(x_rd_en && y_rd_en));

endmodule
