// bp_adders: the three-input adder bank of the processing element.
//
// For each of the D labels it forms h = M + M_last + C, the sum of the pixel's
// stored combined message M (the two messages of the orthogonal group), the
// message M_last that arrives from the previous pixel of the sweep, and the
// pixel's data cost C. h is what the message-update function turns into the
// message sent on to the next pixel; it is the same sum in forward and
// backward sweeps. The operation follows the message-passing equations of the
// design; the output width H_W, wide enough that no sum overflows, is this
// design's choice.
//
// Timing: purely combinational.
module bp_adders #(
  parameter int unsigned D      = bp_pkg::NUM_LABELS,
  parameter int unsigned COST_W = bp_pkg::COST_W,
  parameter int unsigned MSG_W  = bp_pkg::MSG_W,
  parameter int unsigned CMSG_W = bp_pkg::CMSG_W,
  parameter int unsigned H_W    = bp_pkg::H_W
) (
  input  logic [D-1:0][COST_W-1:0] cost,
  input  logic [D-1:0][CMSG_W-1:0] cmsg,
  input  logic [D-1:0][MSG_W-1:0]  last,
  output logic [D-1:0][H_W-1:0]    h
);
  always_comb begin
    for (int d = 0; d < D; d++) begin
      h[d] = H_W'(cost[d]) + H_W'(cmsg[d]) + H_W'(last[d]);
    end
  end
endmodule
