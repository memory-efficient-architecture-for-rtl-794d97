// tb_wta: self-checking test of the winner-take-all selection.
//
// Random sums h and buffered messages, some with forced ties on the minimum,
// are compared with a reference that scans the beliefs here and keeps the
// first smallest. Both the label and the belief value are checked. A watchdog
// bounds the run.
module tb_wta;
  localparam int unsigned D = bp_pkg::NUM_LABELS;
  localparam int unsigned CMSG_W = bp_pkg::CMSG_W, H_W = bp_pkg::H_W, BEL_W = bp_pkg::BEL_W;
  localparam int unsigned DW = $clog2(D);
  logic [D-1:0][H_W-1:0]    h;
  logic [D-1:0][CMSG_W-1:0] buffered;
  logic [DW-1:0]            disp;
  logic [BEL_W-1:0]         min_belief;
  int checks = 0, failures = 0;

  wta dut (.*);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int t = 0; t < 500; t++) begin
      int best, bestv;
      for (int d = 0; d < D; d++) begin
        h[d] = H_W'($urandom % ((t % 3 == 0) ? 8 : 5000));
        buffered[d] = CMSG_W'($urandom % ((t % 3 == 0) ? 4 : 2048));
      end
      if (t == 1) for (int d = 0; d < D; d++) begin h[d] = '1; buffered[d] = '1; end
      #1;
      best = 0; bestv = int'(h[0]) + int'(buffered[0]);
      for (int d = 1; d < D; d++)
        if (int'(h[d]) + int'(buffered[d]) < bestv) begin
          best = d; bestv = int'(h[d]) + int'(buffered[d]);
        end
      checks += 2;
      if (int'(disp) != best || int'(min_belief) != bestv) begin
        failures++;
        if (failures < 10) $display("t=%0d disp=%0d/%0d belief=%0d/%0d", t, disp, best, min_belief, bestv);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
