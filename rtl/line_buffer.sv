// line_buffer: the buffer B(j) of the single-memory architecture.
//
// During a forward sweep along one line (a row when passing to the right, a
// column when passing down) the message that arrives at position j from the
// previous pixel is written to entry j. During the backward sweep of the same
// line, entry j is read and added to the message arriving from the other side,
// which gives the pixel's new combined message. A lane has one line in flight
// at a time, so N entries of D labels suffice; each lane has its own buffer.
// Entries are W bits wide, the width of the combined message, and hold
// MSG_W-bit messages zero-extended.
//
// Timing: synchronous write, asynchronous read, no reset (SRAM-like).
module line_buffer #(
  parameter int unsigned N  = bp_pkg::TILE_N,
  parameter int unsigned D  = bp_pkg::NUM_LABELS,
  parameter int unsigned W  = bp_pkg::CMSG_W,
  localparam int unsigned AW = $clog2(N)
) (
  input  logic                  clk,
  input  logic                  wr_en,
  input  logic [AW-1:0]         wr_addr,
  input  logic [D-1:0][W-1:0]   wr_data,
  input  logic [AW-1:0]         rd_addr,
  output logic [D-1:0][W-1:0]   rd_data
);
  logic [D-1:0][W-1:0] mem [N];

  always_ff @(posedge clk) begin
    if (wr_en) mem[wr_addr] <= wr_data;
  end

  assign rd_data = mem[rd_addr];
endmodule
