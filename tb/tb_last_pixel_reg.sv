// tb_last_pixel_reg: self-checking test of the message-from-last-pixel register.
//
// Random load, clear and data each cycle, compared with a model register kept
// here: reset gives zero, clear beats load and gives zero, load takes d, and
// neither holds the value. A watchdog bounds the run.
module tb_last_pixel_reg;
  localparam int unsigned D = bp_pkg::NUM_LABELS, MSG_W = bp_pkg::MSG_W;
  logic clk = 1'b0, rst_n, clear, load;
  logic [D-1:0][MSG_W-1:0] d, q, model;
  int checks = 0, failures = 0;
  int n_clear = 0, n_load = 0, n_hold = 0;

  last_pixel_reg dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rst_n = 1'b0; clear = 1'b0; load = 1'b0; d = '1;
    #12;
    checks++;
    if (q != '0) failures++;
    rst_n = 1'b1;
    model = '0;
    for (int t = 0; t < 1000; t++) begin
      @(negedge clk);
      clear = ($urandom % 5) == 0;
      load  = ($urandom % 3) != 0;
      for (int k = 0; k < D; k++) d[k] = MSG_W'($urandom);
      @(posedge clk);
      if (clear) begin model = '0; n_clear++; end
      else if (load) begin model = d; n_load++; end
      else n_hold++;
      #1;
      checks++;
      if (q != model) begin
        failures++;
        if (failures < 10) $display("t=%0d q differs from model", t);
      end
    end
    checks++;
    if (n_clear == 0 || n_load == 0 || n_hold == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
