// cdc: configuration data cache of the logic block.
//
// A small memory of DEPTH contexts (64 truth-table bits, 3 mode bits and the
// output-register selects, see mcmg_pkg::context_t). It has its own write
// port, the configuration data line, so a context can be rewritten while the
// LUT keeps running on the active one, and an asynchronous read port used by
// the control logic to load a context into the LUT.
//
// Timing: a write (wr_en high) lands at the rising clock edge. rd_data follows
// rd_addr combinationally; a read of the slot being written in the same cycle
// returns the old contents. The contents are not reset. An assertion flags
// a write to a slot beyond DEPTH.
//
// The default DEPTH of 16 holds 16 x 64 = 1,024 table bits, the cache size the
// proposal uses as its example. The separate write port follows the proposal
// (the cache can be rewritten while the LUT works); the port shapes and the
// asynchronous read are this design's choice.
module cdc
  import mcmg_pkg::*;
#(
  parameter int unsigned DEPTH = 16,
  localparam int unsigned AW   = (DEPTH > 1) ? $clog2(DEPTH) : 1
) (
  input  logic          clk,
  input  logic          wr_en,
  input  logic [AW-1:0] wr_addr,
  input  context_t      wr_data,
  input  logic [AW-1:0] rd_addr,
  output context_t      rd_data
);

  context_t mem [DEPTH];

  always_ff @(posedge clk) begin
    if (wr_en && (int'(wr_addr) < DEPTH))
      mem[wr_addr] <= wr_data;
  end

  // A write must name an existing slot (only possible to break when DEPTH
  // is not a power of two; such a write is dropped).
  a_wr_in_range: assert property (@(posedge clk) wr_en |-> (int'(wr_addr) < DEPTH))
    else $error("cdc: write to slot %0d of %0d", wr_addr, DEPTH);

  always_comb begin
    if (int'(rd_addr) < DEPTH) rd_data = mem[rd_addr];
    else                       rd_data = '0;
  end

endmodule
