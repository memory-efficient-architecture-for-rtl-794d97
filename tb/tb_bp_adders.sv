// tb_bp_adders: self-checking test of the three-input adder bank.
//
// Drives random costs, combined messages and incoming messages, including the
// all-ones extremes, and compares every label of h with the sum computed here
// in 32-bit integers. Combinational, so a fixed delay separates drive and
// compare; a watchdog bounds the run.
module tb_bp_adders;
  localparam int unsigned D = bp_pkg::NUM_LABELS;
  localparam int unsigned COST_W = bp_pkg::COST_W, MSG_W = bp_pkg::MSG_W,
                          CMSG_W = bp_pkg::CMSG_W, H_W = bp_pkg::H_W;
  logic [D-1:0][COST_W-1:0] cost;
  logic [D-1:0][CMSG_W-1:0] cmsg;
  logic [D-1:0][MSG_W-1:0]  last;
  logic [D-1:0][H_W-1:0]    h;
  int checks = 0, failures = 0;

  bp_adders dut (.*);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int t = 0; t < 300; t++) begin
      for (int d = 0; d < D; d++) begin
        if (t == 0) begin
          cost[d] = '1; cmsg[d] = '1; last[d] = '1;
        end else begin
          cost[d] = COST_W'($urandom); cmsg[d] = CMSG_W'($urandom); last[d] = MSG_W'($urandom);
        end
      end
      #1;
      for (int d = 0; d < D; d++) begin
        int unsigned exp;
        exp = int'(cost[d]) + int'(cmsg[d]) + int'(last[d]);
        checks++;
        if (int'(h[d]) != exp) begin
          failures++;
          if (failures < 10) $display("t=%0d d=%0d h=%0d expected %0d", t, d, h[d], exp);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
