// message_mem: the single message memory of the proposed architecture.
//
// One word per pixel holding W-bit combined messages for all D labels. A
// combined message is the sum of the two messages of one group: during the
// horizontal passes the word holds up+down (the vertical group, read but not
// changed by the forward pass and replaced by left+right during the backward
// pass); during the vertical passes it holds left+right and is replaced by
// up+down. Thus one word per pixel replaces the four per-direction message
// memories of a plain tile BP design. A single bank holds the tile row-major;
// with several processing lanes it is split into banks of WORDS = N*N/LANES
// words (see bp_top).
//
// Timing: synchronous write, asynchronous read. A read and a write of the same
// address in one cycle return the old word; the backward pass relies on this
// when it reads a pixel's word and overwrites it in the same cycle. Single-cycle
// read and the absence of a reset are this design's choices.
module message_mem #(
  parameter int unsigned N  = bp_pkg::TILE_N,
  parameter int unsigned D  = bp_pkg::NUM_LABELS,
  parameter int unsigned W  = bp_pkg::CMSG_W,
  parameter int unsigned WORDS = N*N,
  localparam int unsigned AW = $clog2(WORDS)
) (
  input  logic                  clk,
  input  logic                  wr_en,
  input  logic [AW-1:0]         wr_addr,
  input  logic [D-1:0][W-1:0]   wr_data,
  input  logic [AW-1:0]         rd_addr,
  output logic [D-1:0][W-1:0]   rd_data
);
  logic [D-1:0][W-1:0] mem [WORDS];

  always_ff @(posedge clk) begin
    if (wr_en) mem[wr_addr] <= wr_data;
  end

  assign rd_data = mem[rd_addr];
endmodule
