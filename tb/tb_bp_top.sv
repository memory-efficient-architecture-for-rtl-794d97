// tb_bp_top: end-to-end test of the tile BP engine, here with four lanes.
//
// Loads TILES tiles of random data costs one after another, runs ITERS
// iterations on each and checks, against a reference computed here:
//  * the sum h sent to the message-update function at every step, against a
//    plain BP that keeps four separate message arrays (left, right, up, down)
//    and sweeps all rows right, all rows left, all columns down, all up;
//  * every disparity and its belief, one per pixel, in the last upward pass;
//  * the message memory after the run, which must hold up+down of every pixel;
//  * that every pixel is visited once per pass and iteration;
//  * the run length, ITERS*4*N*N/LANES cycles from start to done.
// The message-update function is the behavioural model msg_update_model; the
// reference has its own copy of the same formula. Each mechanism of the engine
// (forward and backward sweeps, line-buffer writes, combined-message writes,
// boundary clears, message clearing on load, each pass direction, disparity
// output, lanes reaching other banks, repeated iterations and tiles) is counted, and one that never
// happens counts as a failure. A watchdog bounds the run.
module tb_bp_top;
  import bp_pkg::*;
  localparam int unsigned NT     = 8;
  localparam int unsigned DT     = 16;
  localparam int unsigned LT     = 4;
  localparam int unsigned ITERS  = 3;
  localparam int unsigned TILES  = 2;
  localparam int unsigned LAMBDA = 8;
  localparam int unsigned TRUNC  = 40;
  localparam int unsigned AW = $clog2(NT*NT), PW = $clog2(NT), DW = $clog2(DT);
  localparam int unsigned HW = CMSG_W + 2, BW = HW + 1;

  // Loop bounds as variables, so that the simulator keeps the reference
  // loops as loops.
  int nd = DT, nn = NT;

  logic clk = 1'b0, rst_n;
  logic ld_en, start, busy, done, mu_valid, disp_valid;
  logic [AW-1:0] ld_addr;
  logic [DT-1:0][COST_W-1:0] ld_cost;
  logic [ITER_W-1:0] iters;
  logic [LT-1:0][DT-1:0][HW-1:0] mu_h;
  logic [LT-1:0][DT-1:0][MSG_W-1:0] mu_msg;
  logic [LT-1:0][PW-1:0] disp_row, disp_col;
  logic [LT-1:0][DW-1:0] disp;
  logic [LT-1:0][BW-1:0] disp_belief;

  bp_top #(.N(NT), .D(DT), .LANES(LT)) dut (.*);

  // one message-update model per lane, and a view of the message banks
  localparam int unsigned WORDS = NT*NT/LT;
  logic [DT-1:0][CMSG_W-1:0] peek [LT][WORDS];
  bit do_peek = 1'b0;
  for (genvar k = 0; k < LT; k++) begin : g_mu
    msg_update_model #(.D(DT), .H_W(HW), .MSG_W(MSG_W), .LAMBDA(LAMBDA), .TRUNC(TRUNC))
      u_mu (.h(mu_h[k]), .m(mu_msg[k]));
    always @(posedge do_peek)
      for (int w = 0; w < WORDS; w++) peek[k][w] = dut.g_bank[k].u_msg.mem[w];
  end

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  localparam int unsigned WATCHDOG = TILES * (ITERS*4*NT*NT/LT + NT*NT + 100) + 100;
  initial begin
    repeat (WATCHDOG) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---------------- reference model ----------------
  int cost [NT][NT][DT];
  int ml [NT][NT][DT], mr [NT][NT][DT], mu [NT][NT][DT], md [NT][NT][DT];
  int href [ITERS][4][NT][NT][DT];
  int dref [NT][NT], bref [NT][NT];

  function automatic void ref_update(input int h [DT], output int m [DT]);
    int v [DT];
    int vmin, c, dst, t;
    vmin = 32'h7fffffff;
    for (int d = 0; d < nd; d++) begin
      v[d] = 32'h7fffffff;
      for (int e = 0; e < nd; e++) begin
        dst = d > e ? d - e : e - d;
        t = LAMBDA * dst;
        if (t > TRUNC) t = TRUNC;
        c = h[e] + t;
        if (c < v[d]) v[d] = c;
      end
      if (v[d] < vmin) vmin = v[d];
    end
    for (int d = 0; d < nd; d++) begin
      m[d] = v[d] - vmin;
      if (m[d] > (1 << MSG_W) - 1) m[d] = (1 << MSG_W) - 1;
    end
  endfunction

  function automatic void run_reference();
    int h [DT], m [DT], in [DT];
    for (int r = 0; r < nn; r++) for (int c = 0; c < nn; c++) for (int d = 0; d < nd; d++) begin
      ml[r][c][d] = 0; mr[r][c][d] = 0; mu[r][c][d] = 0; md[r][c][d] = 0;
    end
    for (int it = 0; it < ITERS; it++) begin
      // to the right
      for (int r = 0; r < nn; r++) begin
        for (int d = 0; d < nd; d++) in[d] = 0;
        for (int c = 0; c < nn; c++) begin
          for (int d = 0; d < nd; d++) begin
            ml[r][c][d] = in[d];
            h[d] = cost[r][c][d] + ml[r][c][d] + mu[r][c][d] + md[r][c][d];
            href[it][0][r][c][d] = h[d];
          end
          ref_update(h, m); in = m;
        end
      end
      // to the left
      for (int r = 0; r < nn; r++) begin
        for (int d = 0; d < nd; d++) in[d] = 0;
        for (int c = nn-1; c >= 0; c--) begin
          for (int d = 0; d < nd; d++) begin
            mr[r][c][d] = in[d];
            h[d] = cost[r][c][d] + mr[r][c][d] + mu[r][c][d] + md[r][c][d];
            href[it][1][r][c][d] = h[d];
          end
          ref_update(h, m); in = m;
        end
      end
      // down
      for (int c = 0; c < nn; c++) begin
        for (int d = 0; d < nd; d++) in[d] = 0;
        for (int r = 0; r < nn; r++) begin
          for (int d = 0; d < nd; d++) begin
            mu[r][c][d] = in[d];
            h[d] = cost[r][c][d] + mu[r][c][d] + ml[r][c][d] + mr[r][c][d];
            href[it][2][r][c][d] = h[d];
          end
          ref_update(h, m); in = m;
        end
      end
      // up
      for (int c = 0; c < nn; c++) begin
        for (int d = 0; d < nd; d++) in[d] = 0;
        for (int r = nn-1; r >= 0; r--) begin
          for (int d = 0; d < nd; d++) begin
            md[r][c][d] = in[d];
            h[d] = cost[r][c][d] + md[r][c][d] + ml[r][c][d] + mr[r][c][d];
            href[it][3][r][c][d] = h[d];
          end
          ref_update(h, m); in = m;
        end
      end
    end
    for (int r = 0; r < nn; r++) for (int c = 0; c < nn; c++) begin
      int b;
      dref[r][c] = 0; bref[r][c] = 32'h7fffffff;
      for (int d = 0; d < nd; d++) begin
        b = cost[r][c][d] + ml[r][c][d] + mr[r][c][d] + mu[r][c][d] + md[r][c][d];
        if (b < bref[r][c]) begin bref[r][c] = b; dref[r][c] = d; end
      end
    end
  endfunction

  // ---------------- mechanism counters ----------------
  int n_fwd = 0, n_bwd = 0, n_bufwr = 0, n_msgwr = 0, n_bclear = 0, n_ldclear = 0;
  int n_pass [4] = '{0, 0, 0, 0};
  int n_disp = 0, n_iter2 = 0, n_rot = 0;
  always @(posedge clk) if (rst_n) begin
    if (mu_valid) begin
      if (dut.bwd) n_bwd++; else n_fwd++;
      n_pass[int'(dut.pass)]++;
      if (!dut.last_iter) n_iter2++;
      if (int'(dut.pos) % LT != 0) n_rot++;
    end
    if (dut.g_lane[0].u_buf.wr_en) n_bufwr++;
    if (!ld_en) n_msgwr += $countones(dut.msg_bank_we);
    if (ld_en) n_ldclear += $countones(dut.msg_bank_we);
    if (dut.sweep_end) n_bclear++;
  end

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("%0t: %s", $time, what);
    end
  endtask

  // per-step check of h and the disparity output
  int it_idx = 0;
  int seen [NT][NT];
  int visits [NT][NT];
  always @(negedge clk) if (rst_n && mu_valid) begin
    int p, r, c, ln;
    bit ok;
    p = int'(dut.pass);
    ln = int'(dut.line);
    for (int k = 0; k < LT; k++) begin
      // the pixel lane k must be on, from the pass, line and position
      r = (p >= 2) ? int'(dut.pos) : ln + k;
      c = (p >= 2) ? ln + k : int'(dut.pos);
      chk(int'(disp_row[k]) == r && int'(disp_col[k]) == c, "lane pixel position");
      visits[r][c]++;
      ok = 1'b1;
      for (int d = 0; d < nd; d++) if (int'(mu_h[k][d]) != href[it_idx][p][r][c][d]) ok = 1'b0;
      chk(ok, $sformatf("h mismatch iter %0d pass %0d pixel (%0d,%0d)", it_idx, p, r, c));
      if (disp_valid) begin
        n_disp++;
        chk(int'(disp[k]) == dref[r][c] && int'(disp_belief[k]) == bref[r][c],
            $sformatf("disparity at (%0d,%0d): %0d/%0d belief %0d/%0d", r, c, disp[k], dref[r][c],
                      disp_belief[k], bref[r][c]));
        seen[r][c]++;
      end
    end
    if (dut.sweep_end && p == 3 && ln == NT-LT) it_idx++;
  end

  initial begin
    int cyc;
    rst_n = 1'b0; ld_en = 1'b0; start = 1'b0; ld_addr = '0; ld_cost = '0; iters = '0;
    #22 rst_n = 1'b1;
    for (int tile = 0; tile < TILES; tile++) begin
      // random costs: a smooth true disparity plus noise, some pixels pure noise
      for (int r = 0; r < nn; r++) for (int c = 0; c < nn; c++) begin
        int tr;
        tr = (r / 2 + c / 3 + tile * 3) % DT;
        for (int d = 0; d < nd; d++) begin
          int v;
          v = 6 * (d > tr ? d - tr : tr - d) + int'($urandom % 24);
          if ($urandom % 8 == 0) v = int'($urandom % 256);
          cost[r][c][d] = v > 255 ? 255 : v;
        end
      end
      run_reference();
      @(negedge clk);
      for (int a = 0; a < nn*nn; a++) begin
        ld_en = 1'b1; ld_addr = AW'(a);
        for (int d = 0; d < nd; d++) ld_cost[d] = COST_W'(cost[a / NT][a % NT][d]);
        @(negedge clk);
      end
      ld_en = 1'b0;
      for (int r = 0; r < nn; r++) for (int c = 0; c < nn; c++) begin seen[r][c] = 0; visits[r][c] = 0; end
      it_idx = 0;
      iters = ITER_W'(ITERS); start = 1'b1;
      @(negedge clk);
      start = 1'b0;
      cyc = 1;
      while (!done) begin @(negedge clk); cyc++; end
      chk(cyc == ITERS*4*NT*NT/LT + 1, $sformatf("start-to-done %0d cycles", cyc));
      chk(!busy, "idle after done");
      do_peek = 1'b1;
      #1 do_peek = 1'b0;
      for (int r = 0; r < nn; r++) for (int c = 0; c < nn; c++) begin
        bit ok;
        chk(seen[r][c] == 1, $sformatf("pixel (%0d,%0d) reported %0d times", r, c, seen[r][c]));
        chk(visits[r][c] == 4*ITERS, $sformatf("pixel (%0d,%0d) visited %0d times", r, c, visits[r][c]));
        ok = 1'b1;
        // bank (r+c) mod LANES, word r*(N/LANES) + c/LANES
        for (int d = 0; d < nd; d++)
          if (int'(peek[(r + c) % LT][r*(NT/LT) + c/LT][d]) != mu[r][c][d] + md[r][c][d]) ok = 1'b0;
        chk(ok, $sformatf("message memory at (%0d,%0d) is not up+down", r, c));
      end
    end
    chk(n_fwd > 0 && n_bwd > 0, "forward and backward sweeps");
    chk(n_bufwr == n_fwd, "line buffer written on every forward step");
    chk(n_msgwr == n_bwd*LT, "combined message written on every backward step");
    chk(n_bclear == TILES*ITERS*4*NT/LT, "boundary clear per sweep");
    chk(n_ldclear == TILES*NT*NT, "message word cleared on load");
    for (int p = 0; p < 4; p++) chk(n_pass[p] == TILES*ITERS*NT*NT/LT, $sformatf("pass %0d count", p));
    if (LT > 1) chk(n_rot > 0, "lanes rotated onto other banks");
    chk(n_disp == TILES*NT*NT, "disparity outputs");
    chk(n_iter2 > 0, "more than one iteration");
    $display("mechanisms: fwd=%0d bwd=%0d bufwr=%0d msgwr=%0d bclear=%0d ldclear=%0d disp=%0d rot=%0d",
             n_fwd, n_bwd, n_bufwr, n_msgwr, n_bclear, n_ldclear, n_disp, n_rot);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
