// rx_regfile: the Rx register file, one entry per interleaving slot.
//
// Entry s holds the input-signal sample x_i of the row that slot s is
// computing, so the signal memory is read once per row instead of once per
// matrix element. It is written in the row-start iteration of each row and
// read, combinationally, by every element of that row.
//
// Interface: one synchronous write port (we, waddr, wdata), one asynchronous
// read port (raddr, rdata). Entries are not reset: each is written before it
// is read. SLOTS is the number of issue slots per band column (the number of
// interleaved computations, dummy slots included).
module rx_regfile
  import dtw_pkg::*;
#(
  parameter int unsigned SLOTS  = 32,
  parameter int unsigned SLOT_W = (SLOTS > 1) ? $clog2(SLOTS) : 1
) (
  input  logic              clk,
  input  logic              we,
  input  logic [SLOT_W-1:0] waddr,
  input  fp32_t             wdata,
  input  logic [SLOT_W-1:0] raddr,
  output fp32_t             rdata
);

  fp32_t mem [SLOTS];

  always_ff @(posedge clk) begin
    if (we) mem[waddr] <= wdata;
  end

  assign rdata = mem[raddr];

endmodule
