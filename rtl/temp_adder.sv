// temp_adder: the extra adder used in backward sweeps.
//
// In a backward sweep the message that arrives at a pixel from the far side
// (M_last) is added, label by label, to the message that arrived from the
// near side during the forward sweep (read back from the line buffer). The sum
// is the pixel's new combined message of this direction group, written over
// the pixel's word in the message memory. Both inputs are MSG_W-bit messages
// (the buffer entry is CMSG_W wide), so the sum fits CMSG_W bits; the result
// saturates at the CMSG_W maximum should a wider value ever reach it, which is
// this design's choice.
//
// Timing: purely combinational.
module temp_adder #(
  parameter int unsigned D      = bp_pkg::NUM_LABELS,
  parameter int unsigned MSG_W  = bp_pkg::MSG_W,
  parameter int unsigned CMSG_W = bp_pkg::CMSG_W
) (
  input  logic [D-1:0][MSG_W-1:0]  last,
  input  logic [D-1:0][CMSG_W-1:0] buffered,
  output logic [D-1:0][CMSG_W-1:0] temp
);
  always_comb begin
    for (int d = 0; d < D; d++) begin
      logic [CMSG_W:0] s;
      s = (CMSG_W+1)'(last[d]) + (CMSG_W+1)'(buffered[d]);
      temp[d] = s[CMSG_W] ? {CMSG_W{1'b1}} : s[CMSG_W-1:0];
    end
  end
endmodule
