// last_pixel_reg: the "message from last pixel" register.
//
// Holds, for every label, the message passed from the pixel processed in the
// previous cycle to the pixel processed now. Each processing cycle it loads
// the output of the message-update function. On the last step of a sweep
// (and on start) it loads zero instead, so the first pixel of the next sweep
// sees a zero message from beyond the tile edge. Zero boundary messages and
// the synchronous clear are this design's choices.
//
// Timing: one rising-edge register; rst_n is an active-low asynchronous reset
// to zero. clear has priority over load.
module last_pixel_reg #(
  parameter int unsigned D     = bp_pkg::NUM_LABELS,
  parameter int unsigned MSG_W = bp_pkg::MSG_W
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    clear,
  input  logic                    load,
  input  logic [D-1:0][MSG_W-1:0] d,
  output logic [D-1:0][MSG_W-1:0] q
);
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)     q <= '0;
    else if (clear) q <= '0;
    else if (load)  q <= d;
  end
endmodule
