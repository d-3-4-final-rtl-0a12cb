// tb_fibha_pingpong_buf: checks the double buffer's hand-over protocol and data.
// A producer writes tiles of random pixels and commits them, a consumer reads and
// releases them with random delays. Checks: data of every tile in order, flag behaviour
// after reset, that the producer is stopped (wr_ready low) with both banks full, and that
// the producer can write tile n+1 while the consumer still holds tile n.
// Concurrent producer/consumer operation is the behaviour the accelerator description
// asks of its double buffers; the handshake checked is this design's.
module tb_fibha_pingpong_buf;
  localparam int WIDTH = 24, DEPTH = 10, NT = 12;
  logic clk = 0, rst_n = 0;
  always #5 clk = !clk;
  logic wr_ready, we, wr_commit, rd_valid, rd_release;
  logic [3:0] waddr, raddr;
  logic [WIDTH-1:0] wdata, rdata;
  logic [WIDTH-1:0] tiles [NT][DEPTH];
  int checks = 0, failures = 0, full_seen = 0, overlap_seen = 0;
  bit consumer_holds = 0;

  fibha_pingpong_buf #(.WIDTH(WIDTH), .DEPTH(DEPTH)) dut (.*);

  task automatic check(logic [WIDTH-1:0] got, logic [WIDTH-1:0] exp, string what);
    checks++;
    if (got !== exp) begin failures++; $display("FAIL %s: got %h exp %h", what, got, exp); end
  endtask

  initial begin
    foreach (tiles[t, i]) tiles[t][i] = WIDTH'($urandom);
    we = 0; wr_commit = 0; waddr = 0; wdata = 0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    @(negedge clk);
    check({31'b0, wr_ready}, 1, "ready after reset");
    check({31'b0, rd_valid}, 0, "not valid after reset");
    for (int t = 0; t < NT; t++) begin
      while (!wr_ready) begin
        if (t >= 2) full_seen++;
        @(negedge clk);
      end
      if (consumer_holds) overlap_seen++;
      for (int i = 0; i < DEPTH; i++) begin
        we = 1; waddr = 4'(i); wdata = tiles[t][i];
        @(negedge clk);
      end
      we = 0; wr_commit = 1;
      @(negedge clk);
      wr_commit = 0;
    end
  end

  initial begin
    rd_release = 0; raddr = 0;
    @(posedge rst_n);
    for (int t = 0; t < NT; t++) begin
      while (!rd_valid) @(negedge clk);
      consumer_holds = 1;
      // slow consumer for the first tiles so the producer fills both banks
      repeat ((t < 4) ? 40 : $urandom_range(3)) @(negedge clk);
      for (int i = DEPTH - 1; i >= 0; i--) begin
        raddr = 4'(i); #1;
        check(rdata, tiles[t][i], $sformatf("tile %0d word %0d", t, i));
      end
      rd_release = 1;
      @(negedge clk);
      rd_release = 0;
      consumer_holds = 0;
    end
    @(negedge clk);
    check({31'b0, rd_valid}, 0, "empty at end");
    checks++;
    if (full_seen == 0) begin failures++; $display("FAIL: producer never stalled on full buffer"); end
    checks++;
    if (overlap_seen == 0) begin failures++; $display("FAIL: no concurrent fill and drain"); end
    $display("producer stall cycles %0d, overlapped tiles %0d", full_seen, overlap_seen);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
