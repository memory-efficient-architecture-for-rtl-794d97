// tb_bp_ctrl: self-checking test of the sweep sequencer.
//
// Runs the sequencer at a small tile (N = 4) for several iteration counts and
// at the default tile for one iteration. The expected schedule is generated
// here by nested loops (iteration, horizontal/vertical group, line, forward
// then backward position) and compared cycle by cycle with pass, line, addr,
// pos, sweep_end and last_iter. The run length must be exactly iters*4*N*N
// step cycles, followed by one done pulse. A third instance, a 4x4 tile with
// four lanes, must sweep one direction in 4 cycles and an iteration in 16, and
// an 8x8 tile with two lanes must step its line in twos. A watchdog bounds
// the run.
module tb_bp_ctrl;
  import bp_pkg::*;
  logic clk = 1'b0, rst_n;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // small instance
  localparam int unsigned NS = 4;
  logic s_start, s_busy, s_done, s_step, s_end, s_last;
  logic [ITER_W-1:0] s_iters;
  pass_e s_pass;
  logic [$clog2(NS*NS)-1:0] s_addr;
  logic [$clog2(NS)-1:0] s_pos, s_line;
  bp_ctrl #(.N(NS), .LANES(1)) u_small (.clk, .rst_n, .start(s_start), .iters(s_iters), .busy(s_busy),
    .done(s_done), .step(s_step), .pass(s_pass), .line(s_line), .addr(s_addr), .pos(s_pos),
    .sweep_end(s_end), .last_iter(s_last));

  // default instance
  localparam int unsigned NB = TILE_N;
  logic b_start, b_busy, b_done, b_step, b_end, b_last;
  logic [ITER_W-1:0] b_iters;
  pass_e b_pass;
  logic [$clog2(NB*NB)-1:0] b_addr;
  logic [$clog2(NB)-1:0] b_pos, b_line;
  bp_ctrl u_big (.clk, .rst_n, .start(b_start), .iters(b_iters), .busy(b_busy),
    .done(b_done), .step(b_step), .pass(b_pass), .line(b_line), .addr(b_addr), .pos(b_pos),
    .sweep_end(b_end), .last_iter(b_last));

  // 4x4 tile, four lanes; and 8x8 tile, two lanes
  logic f_start, f_busy, f_done, f_step, f_end, f_last;
  pass_e f_pass;
  logic [3:0] f_addr;
  logic [1:0] f_pos, f_line;
  bp_ctrl #(.N(4), .LANES(4)) u_fig (.clk, .rst_n, .start(f_start), .iters(8'd1), .busy(f_busy),
    .done(f_done), .step(f_step), .pass(f_pass), .line(f_line), .addr(f_addr), .pos(f_pos),
    .sweep_end(f_end), .last_iter(f_last));
  logic t_start, t_busy, t_done, t_step, t_end, t_last;
  pass_e t_pass;
  logic [5:0] t_addr;
  logic [2:0] t_pos, t_line;
  bp_ctrl #(.N(8), .LANES(2)) u_two (.clk, .rst_n, .start(t_start), .iters(8'd2), .busy(t_busy),
    .done(t_done), .step(t_step), .pass(t_pass), .line(t_line), .addr(t_addr), .pos(t_pos),
    .sweep_end(t_end), .last_iter(t_last));

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("%0t: %s", $time, what);
    end
  endtask

  task automatic run_small(input int iters);
    int cyc;
    @(negedge clk);
    s_iters = ITER_W'(iters); s_start = 1'b1;
    @(negedge clk);
    s_start = 1'b0;
    cyc = 0;
    for (int it = 0; it < (iters == 0 ? 1 : iters); it++)
      for (int v = 0; v < 2; v++)
        for (int ln = 0; ln < NS; ln++)
          for (int b = 0; b < 2; b++)
            for (int k = 0; k < NS; k++) begin
              int p, r, c;
              p = b ? NS-1-k : k;
              r = v ? p : ln;
              c = v ? ln : p;
              chk(s_step && s_busy, "step low during run");
              chk(int'(s_pass) == 2*v + b, "pass");
              chk(int'(s_addr) == r*NS + c, "addr");
              chk(int'(s_pos) == p, "pos");
              chk(int'(s_line) == ln, "line");
              chk(s_end == (k == NS-1), "sweep_end");
              chk(s_last == (it == (iters == 0 ? 0 : iters-1)), "last_iter");
              cyc++;
              @(negedge clk);
            end
    chk(!s_busy && s_done, "done pulse / busy after run");
    chk(cyc == 4*NS*NS*(iters == 0 ? 1 : iters), "cycle count");
    @(negedge clk);
    chk(!s_done && !s_step, "done is one cycle");
  endtask

  initial begin
    int cnt;
    rst_n = 1'b0; s_start = 1'b0; b_start = 1'b0; s_iters = '0; b_iters = '0;
    f_start = 1'b0; t_start = 1'b0;
    #22 rst_n = 1'b1;
    @(negedge clk);
    chk(!s_busy && !s_step && !b_busy, "idle after reset");
    run_small(1);
    run_small(3);
    run_small(0);
    // default size, one iteration: count cycles and sweep ends
    @(negedge clk);
    b_iters = 8'd1; b_start = 1'b1;
    @(negedge clk);
    b_start = 1'b0;
    cnt = 0;
    while (b_busy) begin
      if (b_end) chk(int'(b_pos) == ((b_pass == PASS_LEFT || b_pass == PASS_UP) ? 0 : NB-1), "big sweep end");
      cnt++;
      @(negedge clk);
    end
    chk(cnt == 4*NB*NB, $sformatf("default-size cycles %0d", cnt));
    // four lanes on a 4x4 tile: 4 cycles per direction, 16 per iteration
    @(negedge clk);
    f_start = 1'b1;
    @(negedge clk);
    f_start = 1'b0;
    cnt = 0;
    while (f_busy) begin
      int k;
      k = cnt % 4;
      chk(int'(f_pass) == cnt / 4, "4-lane pass order");
      chk(int'(f_pos) == ((cnt / 4) % 2 ? 3 - k : k), "4-lane position");
      chk(f_line == '0, "4-lane line");
      chk(f_end == (k == 3), "4-lane sweep end");
      cnt++;
      @(negedge clk);
    end
    chk(cnt == 16, $sformatf("4x4 four-lane iteration took %0d cycles", cnt));
    // two lanes on an 8x8 tile, two iterations: lines 0,2,4,6
    @(negedge clk);
    t_start = 1'b1;
    @(negedge clk);
    t_start = 1'b0;
    cnt = 0;
    while (t_busy) begin
      chk(int'(t_line) == 2 * ((cnt / 16) % 4), "2-lane line");
      cnt++;
      @(negedge clk);
    end
    chk(cnt == 2*4*8*8/2, $sformatf("8x8 two-lane run took %0d cycles", cnt));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
