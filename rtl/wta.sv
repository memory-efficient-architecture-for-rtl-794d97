// wta: winner-take-all disparity selection.
//
// During the last upward sweep of the last iteration, the sum h (data cost +
// stored left+right message + message from below) plus the message from above
// (read back from the line buffer) is the full belief of the pixel for each
// label. This block forms those D beliefs and returns the index of the
// smallest, the lowest index on a tie, as the pixel's disparity. Picking the
// lowest-belief label is the usual min-sum readout; how the design reads out
// its disparity is this design's choice.
//
// Timing: purely combinational (a linear compare chain).
module wta #(
  parameter int unsigned D      = bp_pkg::NUM_LABELS,
  parameter int unsigned CMSG_W = bp_pkg::CMSG_W,
  parameter int unsigned H_W    = bp_pkg::H_W,
  parameter int unsigned BEL_W  = bp_pkg::BEL_W,
  localparam int unsigned DW    = $clog2(D)
) (
  input  logic [D-1:0][H_W-1:0]    h,
  input  logic [D-1:0][CMSG_W-1:0] buffered,
  output logic [DW-1:0]            disp,
  output logic [BEL_W-1:0]         min_belief
);
  always_comb begin
    logic [BEL_W-1:0] b;
    disp       = '0;
    min_belief = BEL_W'(h[0]) + BEL_W'(buffered[0]);
    for (int d = 1; d < D; d++) begin
      b = BEL_W'(h[d]) + BEL_W'(buffered[d]);
      if (b < min_belief) begin
        min_belief = b;
        disp       = DW'(d);
      end
    end
  end
endmodule
