// msg_update_model: behavioural model of the BP message-update function.
//
// The engine sends out the sum h(d) of data cost and incoming messages and
// expects the outgoing message back in the same cycle. This model supplies
// the min-sum update with a truncated-linear smoothness term:
//   m(d) = min over d' of ( h(d') + min(LAMBDA*|d-d'|, TRUNC) ),
// normalised by subtracting min over d of m(d) and saturated to MSG_W bits.
// It is a testbench model only (combinational, O(D^2)), standing in for
// whatever update hardware is paired with the engine.
module msg_update_model #(
  parameter int unsigned D      = bp_pkg::NUM_LABELS,
  parameter int unsigned H_W    = bp_pkg::H_W,
  parameter int unsigned MSG_W  = bp_pkg::MSG_W,
  parameter int unsigned LAMBDA = 8,
  parameter int unsigned TRUNC  = 40
) (
  input  logic [D-1:0][H_W-1:0]   h,
  output logic [D-1:0][MSG_W-1:0] m
);
  int unsigned nd = D;   // run-time loop bound: keeps the D*D loop rolled

  always_comb begin
    int unsigned v [D];
    int unsigned vmin, c, dst;
    vmin = '1;
    for (int d = 0; d < nd; d++) begin
      v[d] = '1;
      for (int e = 0; e < nd; e++) begin
        dst = (d > e) ? d - e : e - d;
        c = int'(h[e]) + ((LAMBDA*dst < TRUNC) ? LAMBDA*dst : TRUNC);
        if (c < v[d]) v[d] = c;
      end
      if (v[d] < vmin) vmin = v[d];
    end
    for (int d = 0; d < nd; d++) begin
      m[d] = (v[d] - vmin > (1 << MSG_W) - 1) ? '1 : MSG_W'(v[d] - vmin);
    end
  end
endmodule
