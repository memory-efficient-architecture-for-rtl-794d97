// tb_temp_adder: self-checking test of the backward-sweep adder.
//
// Adds random MSG_W-bit messages to random buffered messages (zero-extended,
// as the line buffer holds them) and, for the saturation path, full-width
// buffered values, comparing with the integer sum clamped to the CMSG_W
// maximum. A watchdog bounds the run.
module tb_temp_adder;
  localparam int unsigned D = bp_pkg::NUM_LABELS;
  localparam int unsigned MSG_W = bp_pkg::MSG_W, CMSG_W = bp_pkg::CMSG_W;
  logic [D-1:0][MSG_W-1:0]  last;
  logic [D-1:0][CMSG_W-1:0] buffered, temp;
  int checks = 0, failures = 0;

  temp_adder dut (.*);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int t = 0; t < 300; t++) begin
      for (int d = 0; d < D; d++) begin
        last[d] = MSG_W'($urandom);
        buffered[d] = (t % 4 == 3) ? CMSG_W'($urandom) : CMSG_W'(MSG_W'($urandom));
        if (t == 0) begin last[d] = '1; buffered[d] = CMSG_W'({MSG_W{1'b1}}); end
      end
      #1;
      for (int d = 0; d < D; d++) begin
        int unsigned exp;
        exp = int'(last[d]) + int'(buffered[d]);
        if (exp > (1 << CMSG_W) - 1) exp = (1 << CMSG_W) - 1;
        checks++;
        if (int'(temp[d]) != exp) begin
          failures++;
          if (failures < 10) $display("t=%0d d=%0d temp=%0d expected %0d", t, d, temp[d], exp);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
