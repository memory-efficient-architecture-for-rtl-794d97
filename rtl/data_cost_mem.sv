// data_cost_mem: on-chip data-cost memory of one tile.
//
// One word per pixel, holding the COST_W-bit matching cost of every one of the
// D labels, so the processing element reads the whole cost vector of a pixel
// in one access. A single bank holds the whole tile, addressed row-major
// (addr = row*N + col); with several processing lanes the tile is split into
// banks of WORDS = N*N/LANES words (see bp_top). The costs
// do not change while the tile is processed; they are written through the
// load port before a run.
//
// Timing: the write is synchronous (wr_en sampled at the rising clock edge);
// the read is asynchronous, rd_data follows rd_addr in the same cycle. The
// single-cycle read is this design's choice, made so that one pixel is
// processed per clock without a read pipeline. The array has no reset, like
// the SRAM it stands for.
module data_cost_mem #(
  parameter int unsigned N      = bp_pkg::TILE_N,
  parameter int unsigned D      = bp_pkg::NUM_LABELS,
  parameter int unsigned COST_W = bp_pkg::COST_W,
  parameter int unsigned WORDS  = N*N,
  localparam int unsigned AW    = $clog2(WORDS)
) (
  input  logic                       clk,
  input  logic                       wr_en,
  input  logic [AW-1:0]              wr_addr,
  input  logic [D-1:0][COST_W-1:0]   wr_data,
  input  logic [AW-1:0]              rd_addr,
  output logic [D-1:0][COST_W-1:0]   rd_data
);
  logic [D-1:0][COST_W-1:0] mem [WORDS];

  always_ff @(posedge clk) begin
    if (wr_en) mem[wr_addr] <= wr_data;
  end

  assign rd_data = mem[rd_addr];
endmodule
