// dtw_controller: sequencer of the DTW accelerator.
//
// A run computes PATTERNS banded DTW distances at once. It walks size+1 rows,
// each of 2R+2 columns, each column of SLOTS consecutive issue slots, and
// issues one operation per clock cycle:
//
//   row 0 (fill)      every slot pushes +Inf: the previous-result memory is
//                     filled with infinity before the first matrix row
//   column 0          row start of matrix row i = row-1: the slot's x_i is
//                     read into Rx, the band moves one position along the
//                     diagonal, and +Inf is pushed (no element computed)
//   column 1+b        band element b (0..2R) of row i, matrix column
//                     j = i - R + b. Inside the matrix the pattern sample y_j
//                     is read and the element computed; outside, +Inf is
//                     pushed instead
//   slot >= PATTERNS  dummy slot: nothing read, +Inf pushed
//
// SLOTS = max(PATTERNS, loop depth), set by the top: with at least as many
// patterns as the recurrence loop has stages every cycle computes a useful
// element (initiation interval 1); with fewer, dummy slots pad each column so
// the loop has time to close.
//
// Interface: `start` (while idle) latches `size` (1..MAX_SIZE samples per
// signal) and begins a run; `active` is high while operations are issued.
// The read requests and the operation are combinational from the counters
// and belong to the current cycle; the memories answer one cycle later. The
// last operation of a run carries `finish`. The order of the iterations
// follows the design; the counter structure and the fill length (2R+2
// columns) are this design's.
module dtw_controller
  import dtw_pkg::*;
#(
  parameter int unsigned PATTERNS = 32,
  parameter int unsigned R        = 16,
  parameter int unsigned MAX_SIZE = 5000,
  parameter int unsigned SLOTS    = (PATTERNS > LOOP_LAT) ? PATTERNS : LOOP_LAT,
  parameter int unsigned SLOT_W   = (SLOTS > 1) ? $clog2(SLOTS) : 1,
  parameter int unsigned IDX_W    = $clog2(MAX_SIZE + 1)
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              start,
  input  logic [IDX_W-1:0]  size,
  output logic              active,
  // signal-memory read requests for this cycle
  output logic              x_rd_en,
  output logic [IDX_W-1:0]  x_rd_idx,
  output logic              y_rd_en,
  output logic [IDX_W-1:0]  y_rd_idx,
  output logic [SLOT_W-1:0] slot,
  // operation issued this cycle
  output op_ctrl_t          op
);

  localparam int unsigned COLS  = 2 * R + 2;
  localparam int unsigned COL_W = $clog2(COLS);
  localparam int unsigned SW    = IDX_W + 2;   // signed width for column arithmetic

  logic [SLOT_W-1:0] slot_q;
  logic [COL_W-1:0]  col_q;
  logic [IDX_W-1:0]  row_q;    // 0 = fill row, 1..size = matrix rows 0..size-1
  logic [IDX_W-1:0]  size_q;
  logic              run_q;

  logic last_slot, last_col, last_row;
  assign last_slot = (slot_q == SLOT_W'(SLOTS - 1));
  assign last_col  = (col_q == COL_W'(COLS - 1));
  assign last_row  = (row_q == size_q);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      run_q  <= 1'b0;
      slot_q <= '0;
      col_q  <= '0;
      row_q  <= '0;
      size_q <= '0;
    end else if (!run_q) begin
      if (start) begin
        run_q  <= 1'b1;
        size_q <= size;
        slot_q <= '0;
        col_q  <= '0;
        row_q  <= '0;
      end
    end else begin
      slot_q <= last_slot ? '0 : slot_q + 1'b1;
      if (last_slot) begin
        col_q <= last_col ? '0 : col_q + 1'b1;
        if (last_col) begin
          row_q <= row_q + 1'b1;
          if (last_row) run_q <= 1'b0;
        end
      end
    end
  end

  // Matrix coordinates of the current operation.
  logic signed [SW-1:0] i_s, j_s;
  logic                 in_matrix, real_slot;

  always_comb begin
    i_s       = $signed({2'b00, row_q}) - SW'(1);
    j_s       = i_s - SW'(R) + $signed(SW'(col_q)) - SW'(1);
    real_slot = (32'(slot_q) < PATTERNS);
    in_matrix = (j_s >= 0) && (j_s < $signed({2'b00, size_q}));

    op        = '{kind: OP_IDLE, first: 1'b0, last: 1'b0, finish: 1'b0};
    x_rd_en   = 1'b0;
    y_rd_en   = 1'b0;
    x_rd_idx  = i_s[IDX_W-1:0];
    y_rd_idx  = j_s[IDX_W-1:0];

    if (run_q) begin
      op.finish = last_slot && last_col && last_row;
      if (real_slot) begin
        op.kind = OP_INF;
        if (row_q != '0) begin
          if (col_q == '0) begin
            x_rd_en = 1'b1;
          end else if (in_matrix) begin
            y_rd_en  = 1'b1;
            op.kind  = OP_COMPUTE;
            op.first = (i_s == 0) && (j_s == 0);
            op.last  = (i_s == $signed({2'b00, size_q}) - SW'(1)) && (j_s == i_s);
          end
        end
      end
    end
  end

  assign slot   = slot_q;
  assign active = run_q;

endmodule
