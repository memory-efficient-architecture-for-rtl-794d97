// bp_ctrl: sweep sequencer of the tile BP engine.
//
// One iteration is four passes in the order right, left, down, up. The tile's
// N lines are taken LANES at a time: a group of LANES rows is swept to the
// right (forward, positions 0..N-1) and at once back to the left (backward,
// positions N-1..0), one lane per row; when all rows are done the same is done
// for groups of columns, down then up. Rows are independent during the
// horizontal passes (they read only the stored vertical group), and columns
// during the vertical ones, so this order gives the same messages as sweeping
// every row right before any row left, and it lets one line buffer of N
// entries per lane serve the whole tile.
//
// Outputs per cycle while busy: step (one pixel per lane is processed), pass
// (sweep direction), line (first line of the current group; lane k works on
// line + k), pos (position along the line, the line-buffer index), addr
// (row-major address of lane 0's pixel), sweep_end (last pixel of a sweep) and
// last_iter. A run of `iters` iterations (0 is treated as 1) starts on a start
// pulse while idle and takes exactly iters*4*N*N/LANES cycles of step; done
// pulses for one cycle after the last step. With LANES = N a direction takes
// N cycles and an iteration 4*N, as in the 4x4, four-unit example of the
// design; with LANES = 1 a single line buffer serves the tile.
//
// The pass order and the forward/backward sweeps are the design's; the grouped
// line order and the start/busy/done handshake are this design's choices.
// N and LANES must be powers of two, LANES <= N.
module bp_ctrl #(
  parameter int unsigned N     = bp_pkg::TILE_N,
  parameter int unsigned LANES = bp_pkg::LANES,
  localparam int unsigned AW   = $clog2(N*N),
  localparam int unsigned PW   = $clog2(N)
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              start,
  input  logic [bp_pkg::ITER_W-1:0] iters,
  output logic              busy,
  output logic              done,
  output logic              step,
  output bp_pkg::pass_e     pass,
  output logic [PW-1:0]     line,
  output logic [PW-1:0]     pos,
  output logic [AW-1:0]     addr,
  output logic              sweep_end,
  output logic              last_iter
);
  logic [bp_pkg::ITER_W-1:0] iter_q, iter_last_q;
  logic [PW-1:0]     line_q, pos_q;
  logic              vert_q, bwd_q;

  localparam logic [PW-1:0] POS_MAX   = PW'(N-1);
  localparam logic [PW-1:0] LINE_LAST = PW'(N-LANES);
  localparam logic [PW-1:0] LINE_INC  = PW'(LANES);

  assign step      = busy;
  assign pos       = pos_q;
  assign line      = line_q;
  assign pass      = bp_pkg::pass_e'({vert_q, bwd_q});
  assign addr      = vert_q ? AW'({pos_q, line_q}) : AW'({line_q, pos_q});
  assign sweep_end = busy && (bwd_q ? (pos_q == '0) : (pos_q == POS_MAX));
  assign last_iter = (iter_q == iter_last_q);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy        <= 1'b0;
      done        <= 1'b0;
      iter_q      <= '0;
      iter_last_q <= '0;
      line_q      <= '0;
      pos_q       <= '0;
      vert_q      <= 1'b0;
      bwd_q       <= 1'b0;
    end else begin
      done <= 1'b0;
      if (!busy) begin
        if (start) begin
          busy        <= 1'b1;
          iter_q      <= '0;
          iter_last_q <= (iters == '0) ? '0 : iters - 1'b1;
          line_q      <= '0;
          pos_q       <= '0;
          vert_q      <= 1'b0;
          bwd_q       <= 1'b0;
        end
      end else if (!sweep_end) begin
        pos_q <= bwd_q ? pos_q - 1'b1 : pos_q + 1'b1;
      end else if (!bwd_q) begin
        // forward sweep finished: go back along the same lines
        bwd_q <= 1'b1;
        pos_q <= POS_MAX;
      end else begin
        // backward sweep finished: next group, next direction group, next iteration
        bwd_q <= 1'b0;
        pos_q <= '0;
        if (line_q != LINE_LAST) begin
          line_q <= line_q + LINE_INC;
        end else begin
          line_q <= '0;
          vert_q <= ~vert_q;
          if (vert_q) begin
            if (last_iter) begin
              busy <= 1'b0;
              done <= 1'b1;
            end else begin
              iter_q <= iter_q + 1'b1;
            end
          end
        end
      end
    end
  end

  initial begin
    assert ((1 << PW) == N) else $error("bp_ctrl: N must be a power of two");
    assert (LANES >= 1 && LANES <= N && (N % LANES) == 0 && (LANES & (LANES - 1)) == 0)
      else $error("bp_ctrl: LANES must be a power of two not above N");
  end
endmodule
