// bp_top: memory-efficient tile belief-propagation engine for stereo disparity.
//
// Min-sum belief propagation on one N x N tile with D disparity labels. The
// four directional messages of a pixel are never stored separately: a single
// message memory holds one combined message per pixel, the sum of the two
// messages of the group that is not being recomputed. During the horizontal
// passes it holds up+down; each forward (rightward) step adds that word, the
// data cost and the message from the previous pixel, hands the sum h to the
// message-update function, and parks the incoming message in the line buffer.
// Each backward (leftward) step does the same and additionally adds the
// incoming message to the parked one, overwriting the pixel's word with
// left+right. The vertical passes repeat this with the roles swapped, so at
// the end of each iteration the memory holds up+down again.
//
// LANES lines are swept in parallel, each by its own lane (adders, last-pixel
// register, line buffer of N entries, disparity selector). The cost and
// message memories are split into LANES banks: pixel (r, c) lives in bank
// (r + c) mod LANES at word r*(N/LANES) + c/LANES. Lane k works on line
// line+k at position pos, so in every pass the lanes hit distinct banks, lane
// k reaching bank (pos + k) mod LANES through a rotator. With the default
// LANES = 1 there is one bank of each and storage is N*N*D*COST_W bits of
// cost, N*N*D*CMSG_W bits of message and N*D*CMSG_W bits of line buffer.
//
// The message-update function itself (h -> outgoing message) is not part of
// this module: lane k's h leaves on mu_h[k] and its updated MSG_W-bit message
// must come back on mu_msg[k] in the same cycle (combinationally); it is
// registered here.
//
// Interface and timing:
//  * Load: while idle, ld_en writes the cost vector ld_cost of pixel ld_addr
//    (row*N + col) and zeroes that pixel's message word. Load every pixel of
//    a tile before start.
//  * start (while idle) runs `iters` iterations, LANES pixels per clock,
//    iters*4*N*N/LANES cycles; busy is high meanwhile and done pulses once
//    after. mu_valid marks the cycles in which mu_h is meaningful.
//  * During the last upward pass, disp_valid marks one result per lane: disp[k]
//    (label with the lowest belief) and disp_belief[k] (that belief) for pixel
//    (disp_row[k], disp_col[k]).
// Memories have a synchronous write and an asynchronous read.
//
// The single combined-message memory, the line buffer, the forward/backward
// equations, the pass order and parallel processing units follow the
// architecture this engine implements. The bank mapping, the grouped line
// order, zero messages at the tile edge, zeroing on load and the
// winner-take-all readout are this design's own choices.
module bp_top #(
  parameter int unsigned N      = bp_pkg::TILE_N,
  parameter int unsigned D      = bp_pkg::NUM_LABELS,
  parameter int unsigned COST_W = bp_pkg::COST_W,
  parameter int unsigned MSG_W  = bp_pkg::MSG_W,
  parameter int unsigned CMSG_W = bp_pkg::CMSG_W,
  parameter int unsigned LANES  = bp_pkg::LANES,
  localparam int unsigned H_W   = CMSG_W + 2,
  localparam int unsigned BEL_W = H_W + 1,
  localparam int unsigned AW    = $clog2(N*N),
  localparam int unsigned PW    = $clog2(N),
  localparam int unsigned DW    = $clog2(D),
  localparam int unsigned WORDS = N*N/LANES,
  localparam int unsigned BAW   = $clog2(WORDS)
) (
  input  logic                                 clk,
  input  logic                                 rst_n,
  // cost load
  input  logic                                 ld_en,
  input  logic [AW-1:0]                        ld_addr,
  input  logic [D-1:0][COST_W-1:0]             ld_cost,
  // run control
  input  logic                                 start,
  input  logic [bp_pkg::ITER_W-1:0]            iters,
  output logic                                 busy,
  output logic                                 done,
  // message-update function, outside this module, one per lane
  output logic                                 mu_valid,
  output logic [LANES-1:0][D-1:0][H_W-1:0]     mu_h,
  input  logic [LANES-1:0][D-1:0][MSG_W-1:0]   mu_msg,
  // disparity output, one per lane
  output logic                                 disp_valid,
  output logic [LANES-1:0][PW-1:0]             disp_row,
  output logic [LANES-1:0][PW-1:0]             disp_col,
  output logic [LANES-1:0][DW-1:0]             disp,
  output logic [LANES-1:0][BEL_W-1:0]          disp_belief
);
  logic              step, sweep_end, last_iter;
  bp_pkg::pass_e     pass;
  logic [AW-1:0]     addr0;
  logic [PW-1:0]     line, pos;
  logic              bwd, vert;

  assign bwd  = (pass == bp_pkg::PASS_LEFT) || (pass == bp_pkg::PASS_UP);
  assign vert = (pass == bp_pkg::PASS_DOWN) || (pass == bp_pkg::PASS_UP);

  bp_ctrl #(.N(N), .LANES(LANES)) u_ctrl (
    .clk, .rst_n, .start, .iters, .busy, .done,
    .step, .pass, .line, .pos, .addr(addr0), .sweep_end, .last_iter
  );

  // ---------------- lane addressing ----------------
  // Bank of pixel (r, c): (r + c) mod LANES; word: r*(N/LANES) + c/LANES.
  function automatic int unsigned bank_of(int unsigned r, int unsigned c);
    return (r + c) % LANES;
  endfunction
  function automatic logic [BAW-1:0] word_of(int unsigned r, int unsigned c);
    return BAW'(r * (N / LANES) + c / LANES);
  endfunction

  logic [LANES-1:0][PW-1:0]  lane_row, lane_col;
  logic [LANES-1:0][BAW-1:0] lane_word;
  always_comb begin
    for (int k = 0; k < LANES; k++) begin
      lane_row[k]  = vert ? pos : PW'(line + PW'(k));
      lane_col[k]  = vert ? PW'(line + PW'(k)) : pos;
      lane_word[k] = word_of(int'(lane_row[k]), int'(lane_col[k]));
    end
  end

  // Lane using bank b this cycle: (b - pos) mod LANES; bank of lane k: (pos + k) mod LANES.
  function automatic int unsigned lane_at_bank(int unsigned b, logic [PW-1:0] p);
    return (b + LANES - (int'(p) % LANES)) % LANES;
  endfunction
  function automatic int unsigned bank_at_lane(int unsigned k, logic [PW-1:0] p);
    return (int'(p) + k) % LANES;
  endfunction

  // ---------------- banks ----------------
  logic [LANES-1:0][D-1:0][COST_W-1:0] cost_bank_rd, cost_rd;
  logic [LANES-1:0][D-1:0][CMSG_W-1:0] msg_bank_rd, msg_rd, msg_bank_wd, temp, buf_rd, buf_wr;
  logic [LANES-1:0][BAW-1:0]           bank_ra, msg_bank_wa;
  logic [LANES-1:0]                    cost_bank_we, msg_bank_we;
  logic [LANES-1:0][D-1:0][MSG_W-1:0]  m_last;
  logic [BAW-1:0]                      ld_word;
  int unsigned                         ld_bank;

  always_comb begin
    ld_bank = bank_of(int'(ld_addr) / N, int'(ld_addr) % N);
    ld_word = word_of(int'(ld_addr) / N, int'(ld_addr) % N);
    for (int b = 0; b < LANES; b++) begin
      int unsigned k;
      k = lane_at_bank(b, pos);
      bank_ra[b]      = lane_word[k];
      cost_bank_we[b] = ld_en && (ld_bank == b);
      if (ld_en) begin
        // loading a pixel zeroes its message word
        msg_bank_we[b] = (ld_bank == b);
        msg_bank_wa[b] = ld_word;
        msg_bank_wd[b] = '0;
      end else begin
        msg_bank_we[b] = step && bwd;
        msg_bank_wa[b] = lane_word[k];
        msg_bank_wd[b] = temp[k];
      end
    end
    for (int k = 0; k < LANES; k++) begin
      cost_rd[k] = cost_bank_rd[bank_at_lane(k, pos)];
      msg_rd[k]  = msg_bank_rd[bank_at_lane(k, pos)];
    end
  end

  for (genvar b = 0; b < LANES; b++) begin : g_bank
    data_cost_mem #(.N(N), .D(D), .COST_W(COST_W), .WORDS(WORDS)) u_cost (
      .clk, .wr_en(cost_bank_we[b]), .wr_addr(ld_word), .wr_data(ld_cost),
      .rd_addr(bank_ra[b]), .rd_data(cost_bank_rd[b])
    );
    message_mem #(.N(N), .D(D), .W(CMSG_W), .WORDS(WORDS)) u_msg (
      .clk, .wr_en(msg_bank_we[b]), .wr_addr(msg_bank_wa[b]), .wr_data(msg_bank_wd[b]),
      .rd_addr(bank_ra[b]), .rd_data(msg_bank_rd[b])
    );
  end

  // ---------------- lanes ----------------
  for (genvar k = 0; k < LANES; k++) begin : g_lane
    always_comb begin
      for (int d = 0; d < D; d++) buf_wr[k][d] = CMSG_W'(m_last[k][d]);
    end

    line_buffer #(.N(N), .D(D), .W(CMSG_W)) u_buf (
      .clk, .wr_en(step && !bwd), .wr_addr(pos), .wr_data(buf_wr[k]),
      .rd_addr(pos), .rd_data(buf_rd[k])
    );

    bp_adders #(.D(D), .COST_W(COST_W), .MSG_W(MSG_W), .CMSG_W(CMSG_W), .H_W(H_W)) u_add (
      .cost(cost_rd[k]), .cmsg(msg_rd[k]), .last(m_last[k]), .h(mu_h[k])
    );

    temp_adder #(.D(D), .MSG_W(MSG_W), .CMSG_W(CMSG_W)) u_temp (
      .last(m_last[k]), .buffered(buf_rd[k]), .temp(temp[k])
    );

    last_pixel_reg #(.D(D), .MSG_W(MSG_W)) u_last (
      .clk, .rst_n, .clear(sweep_end || start), .load(step), .d(mu_msg[k]), .q(m_last[k])
    );

    wta #(.D(D), .CMSG_W(CMSG_W), .H_W(H_W), .BEL_W(BEL_W)) u_wta (
      .h(mu_h[k]), .buffered(buf_rd[k]), .disp(disp[k]), .min_belief(disp_belief[k])
    );
  end

  assign mu_valid   = step;
  assign disp_valid = step && last_iter && (pass == bp_pkg::PASS_UP);
  assign disp_row   = lane_row;
  assign disp_col   = lane_col;

  // A tile may only be loaded while the engine is idle.
  a_load_idle: assert property (@(posedge clk) ld_en |-> !busy)
    else $error("bp_top: cost load while busy");
  // Lane 0's pixel, as the controller reports it, matches the lane addressing.
  a_lane0: assert property (@(posedge clk) step |-> (AW'({lane_row[0], lane_col[0]}) == addr0))
    else $error("bp_top: lane addressing differs from the controller");
endmodule
