// cost_memory: the cost table of one column of the array.
//
// All processors of column j compare reference characters against the same
// character y_j of the erroneous word, so they share one table, indexed by
// the reference character: entry x holds {del(x), sub(x,y_j)} (see cost_t).
// A systolic step lasts several clocks, so the table is read once per clock
// for the column's processors in turn (one read per processor per step).
// Reads are asynchronous (the word appears on rdata_o in the same clock);
// writes are synchronous and come from the column bus during configuration.
// Sharing one table per column follows the chip; the word layout, with a
// per-character deletion cost, and the read timing are this design's.
//
// Ports: we_i/waddr_i/wdata_i write port; raddr_i/rdata_o read port.
module cost_memory
  import spell_pkg::*;
#(
  parameter int unsigned CHAR_W = CHAR_W_DEF
) (
  input  logic              clk_i,
  input  logic              we_i,
  input  logic [CHAR_W-1:0] waddr_i,
  input  cost_t             wdata_i,
  input  logic [CHAR_W-1:0] raddr_i,
  output cost_t             rdata_o
);
  cost_t mem [2**CHAR_W];

  always_ff @(posedge clk_i) begin
    if (we_i) mem[waddr_i] <= wdata_i;
  end

  assign rdata_o = mem[raddr_i];
endmodule
