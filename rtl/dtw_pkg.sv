// dtw_pkg: types and constants shared by the DTW accelerator.
//
// All signal samples, distances and DTW matrix elements are IEEE-754
// single-precision numbers (fp32_t). Every DTW matrix element is a sum of
// squared differences and is therefore non-negative; for such values the
// bit pattern orders like an unsigned integer, which the minimum unit relies
// on. "Infinite" (outside the matrix or outside the band) is +Inf.
//
// op_kind_e classifies one issue slot of the datapath: an idle slot (a dummy
// pattern, see the interleaving section of the README), a slot that only
// pushes +Inf into the previous-result memory (initial fill, row start,
// element outside the matrix) or a slot that computes one matrix element.
package dtw_pkg;

  typedef struct packed {
    logic       sign;
    logic [7:0] exp;
    logic [22:0] man;
  } fp32_t;

  localparam fp32_t FP_POS_INF  = '{sign: 1'b0, exp: 8'hFF, man: 23'd0};
  localparam fp32_t FP_POS_ZERO = '{sign: 1'b0, exp: 8'h00, man: 23'd0};
  localparam fp32_t FP_QNAN     = '{sign: 1'b0, exp: 8'hFF, man: 23'h400000};

  typedef enum logic [1:0] {
    OP_IDLE    = 2'd0,  // dummy slot: nothing computed, +Inf pushed
    OP_INF     = 2'd1,  // skipped iteration: +Inf pushed
    OP_COMPUTE = 2'd2   // w(i,j) = min(...) + Dist(x_i, y_j)
  } op_kind_e;

  // Control word that travels down the datapath beside the data.
  typedef struct packed {
    op_kind_e   kind;
    logic       first;   // element w(0,0): the minimum is taken as 0
    logic       last;    // element w(n-1,n-1): the DTW distance
    logic       finish;  // last issue slot of the whole run
  } op_ctrl_t;

  // Default number of registered stages from the moment the minimum unit
  // reads the previous-result memory until the new element is available to it
  // again (minimum stage + adder stage); this is also the smallest possible
  // value. The number of issue slots per matrix column must be at least this.
  // The units take it as parameter LOOP_STAGES, which may be raised to model a
  // deeper pipeline.
  localparam int unsigned LOOP_LAT = 2;

  // Registered stages of the distance unit (input, subtract, square).
  localparam int unsigned DIST_LAT = 3;

endpackage
