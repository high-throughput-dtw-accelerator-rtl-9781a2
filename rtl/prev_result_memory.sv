// prev_result_memory: the sliding row of previously computed DTW matrix
// elements, for every interleaved computation.
//
// One new value enters per clock cycle (a computed element, or +Inf for a
// skipped iteration or a dummy slot) and everything moves one position on, as
// a single long shift register cut into three parts:
//
//   din -> Last (SLOTS - LOOP_DLY entries) -> Band (2*R*SLOTS) -> Output (SLOTS)
//
// With SLOTS issue slots per band column, the value a slot needs as
// w(i,j-1) was produced exactly SLOTS cycles ago, w(i-1,j) (2R+1)*SLOTS cycles
// ago and w(i-1,j-1) (2R+2)*SLOTS cycles ago, because every row takes 2R+2
// columns (one row-start column plus the 2R+1 band elements). The three
// outputs are the ends of the three parts, so the three operands are read in
// parallel while the long middle part (Band) has a single output and maps to
// LUT shift registers. The interleaved slots of one column sit next to each
// other in the chain, the arrangement the design calls for.
//
// din is the registered output of the adder, which already holds the value
// of the operation issued LOOP_DLY cycles ago (the loop depth, LOOP_LAT
// by default); the Last part therefore only
// holds the remaining SLOTS - LOOP_DLY cycles of delay, and when SLOTS equals
// LOOP_DLY it is empty and last_o is din itself (a bypass).
//
// No reset: the controller fills the whole chain with +Inf before a run.
// Requires R >= 1 and SLOTS >= LOOP_DLY.
module prev_result_memory
  import dtw_pkg::*;
#(
  parameter int unsigned R        = 16,
  parameter int unsigned SLOTS    = 32,
  parameter int unsigned LOOP_DLY = LOOP_LAT
) (
  input  logic  clk,
  input  fp32_t din,
  output fp32_t last_o,
  output fp32_t band_o,
  output fp32_t out_o
);

  localparam int unsigned LAST_LEN = SLOTS - LOOP_DLY;
  localparam int unsigned BAND_LEN = 2 * R * SLOTS;

  fp32_t band_q [BAND_LEN];
  fp32_t out_q  [SLOTS];
  fp32_t last_end;

  generate
    if (LAST_LEN == 0) begin : g_bypass
      assign last_end = din;
    end else begin : g_last
      fp32_t last_q [LAST_LEN];
      always_ff @(posedge clk) begin
        last_q[0] <= din;
        for (int k = 1; k < LAST_LEN; k++) last_q[k] <= last_q[k-1];
      end
      assign last_end = last_q[LAST_LEN-1];
    end
  endgenerate

  always_ff @(posedge clk) begin
    band_q[0] <= last_end;
    for (int k = 1; k < BAND_LEN; k++) band_q[k] <= band_q[k-1];
    out_q[0] <= band_q[BAND_LEN-1];
    for (int k = 1; k < SLOTS; k++) out_q[k] <= out_q[k-1];
  end

  assign last_o = last_end;
  assign band_o = band_q[BAND_LEN-1];
  assign out_o  = out_q[SLOTS-1];

  initial begin
    assert (R >= 1) else $error("prev_result_memory: R must be at least 1");
    assert (SLOTS >= LOOP_DLY) else $error("prev_result_memory: SLOTS below loop latency");
  end

endmodule
