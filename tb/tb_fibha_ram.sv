// tb_fibha_ram: checks the on-chip weight/bias buffer: random writes, then reads of every
// word against a shadow copy, a read of an out-of-range address (returns zero), and that
// a write becomes visible exactly one clock edge later.
// The per-engine weight buffer follows the accelerator description; its timing is this
// design's.
module tb_fibha_ram;
  localparam int WIDTH = 40, DEPTH = 24;
  logic clk = 0;
  always #5 clk = !clk;
  logic we;
  logic [$clog2(DEPTH)-1:0] waddr, raddr;
  logic [WIDTH-1:0] wdata, rdata;
  logic [WIDTH-1:0] shadow [DEPTH];
  int checks = 0, failures = 0;

  fibha_ram #(.WIDTH(WIDTH), .DEPTH(DEPTH)) dut (.clk, .we, .waddr, .wdata, .raddr, .rdata);

  task automatic check(logic [WIDTH-1:0] got, logic [WIDTH-1:0] exp, string what);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %h exp %h", what, got, exp);
    end
  endtask

  initial begin
    we = 0; waddr = 0; wdata = 0; raddr = 0;
    for (int i = 0; i < DEPTH; i++) begin
      @(negedge clk);
      we = 1; waddr = 5'(i); wdata = {$urandom, $urandom}; shadow[i] = wdata;
    end
    @(negedge clk); we = 0;
    for (int i = 0; i < DEPTH; i++) begin
      raddr = 5'(i); #1;
      check(rdata, shadow[i], $sformatf("read %0d", i));
    end
    raddr = 5'(DEPTH + 3); #1;
    check(rdata, '0, "out of range read");
    // write timing: old value before the edge, new value after
    raddr = 5'd7;
    @(negedge clk); we = 1; waddr = 5'd7; wdata = 40'h12_3456_789a; #1;
    check(rdata, shadow[7], "before edge");
    @(posedge clk); #1;
    check(rdata, 40'h12_3456_789a, "after edge");
    we = 0;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
