// tb_line_buffer: self-checking test of line_buffer.
//
// Fills every word with random data through the write port, keeping a copy in
// a testbench array, then reads all words back in a random order and compares.
// It also checks that a cycle with wr_en low changes nothing and that a read
// of the address being written in the same cycle returns the old word (the
// write lands at the clock edge). A watchdog ends the run if it hangs.
module tb_line_buffer;
  localparam int unsigned N  = 32;
  localparam int unsigned D  = 64;
  localparam int unsigned W  = 11;
  localparam int unsigned DEPTH = N;
  localparam int unsigned AW = $clog2(DEPTH);

  logic                clk = 1'b0;
  logic                wr_en;
  logic [AW-1:0]       wr_addr, rd_addr;
  logic [D-1:0][W-1:0] wr_data, rd_data;
  logic [D-1:0][W-1:0] shadow [DEPTH];
  int checks = 0, failures = 0;

  line_buffer #(.N(N), .D(D), .W(W)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [D-1:0][W-1:0] rand_word();
    logic [D-1:0][W-1:0] v;
    for (int d = 0; d < D; d++) v[d] = W'($urandom);
    return v;
  endfunction

  task automatic check_read(input int a);
    rd_addr = AW'(a);
    #1;
    checks++;
    if (rd_data !== shadow[a]) begin
      failures++;
      $display("mismatch at word %0d", a);
    end
  endtask

  initial begin
    wr_en = 1'b0; wr_addr = '0; rd_addr = '0; wr_data = '0;
    @(negedge clk);
    for (int a = 0; a < DEPTH; a++) begin
      wr_en = 1'b1; wr_addr = AW'(a); wr_data = rand_word();
      shadow[a] = wr_data;
      @(negedge clk);
    end
    wr_en = 1'b0;
    for (int k = 0; k < DEPTH; k++) check_read(int'($urandom % DEPTH));
    for (int a = 0; a < DEPTH; a++) check_read(a);
    // wr_en low: no change over a clock edge
    @(negedge clk);
    wr_addr = AW'(DEPTH/2); wr_data = ~shadow[DEPTH/2];
    @(negedge clk);
    @(negedge clk);
    check_read(DEPTH/2);
    // read and write the same word in one cycle: old data first, new after
    for (int k = 0; k < 32; k++) begin
      int a;
      a = int'($urandom % DEPTH);
      wr_en = 1'b1; wr_addr = AW'(a); wr_data = rand_word();
      check_read(a);
      @(negedge clk);
      shadow[a] = wr_data;
      wr_en = 1'b0;
      check_read(a);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
