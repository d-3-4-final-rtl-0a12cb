// tb_fibha_sesl_stage: one dedicated SESL engine (depthwise 3x3 on an 8x8x8 tile, 4 PEs)
// between testbench-modelled buffers. Weights and biases are loaded through the load
// ports. The test offers a tile while the downstream buffer is full and checks that the
// stage waits ('stalled', no start), then lets it run and checks the output tile, the
// single release/commit pulse at the end and the tile latency (engine latency + 1).
// Dedicated engines between double buffers follow the accelerator description; the
// stall rule checked is this design's handshake.
module tb_fibha_sesl_stage;
  import fibha_pkg::*;
  import fibha_ref_pkg::*;

  localparam int H = 8, W = 8, C = 8, PAR = 4, K = 3, SHIFT = 8;
  localparam int OH = H - 2, OW = W - 2;
  logic clk = 0, rst_n = 0;
  always #5 clk = !clk;

  logic wl_we, bl_we, in_valid, in_release, out_ready, out_we, out_commit, busy, stalled;
  logic [15:0] wl_addr;
  logic [7:0] bl_addr;
  wgt_t [PAR-1:0] wl_data;
  acc_t [PAR-1:0] bl_data;
  logic [5:0] in_raddr, out_waddr;
  act_t [C-1:0] in_rdata, out_wdata;
  act_t [C-1:0] in_mem [H*W];
  act_t [C-1:0] out_mem [OH*OW];

  assign in_rdata = in_mem[in_raddr];
  always_ff @(posedge clk) if (out_we) out_mem[out_waddr] <= out_wdata;

  fibha_sesl_stage #(.LTYPE(LT_DW), .K(K), .STRIDE(1), .H_IN(H), .W_IN(W), .C_IN(C), .C_OUT(C),
                     .PAR(PAR)) dut (.*, .shift(5'(SHIFT)));

  int checks = 0, failures = 0, stall_cycles = 0, releases = 0, commits = 0, cycles = 0;
  always_ff @(posedge clk) begin
    if (in_release) releases++;
    if (out_commit) commits++;
  end

  initial begin
    iarr_t x, wn, b, y;
    int exp_cycles;
    wl_we = 0; bl_we = 0; wl_addr = 0; bl_addr = 0; wl_data = '0; bl_data = '0;
    in_valid = 0; out_ready = 0;
    x = rand_arr(H*W*C, -128, 127);
    wn = rand_arr(C*K*K, -128, 127);
    b = rand_arr(C, -2000, 2000);
    y = conv(DW, K, 1, H, W, C, C, SHIFT, x, wn, b);
    for (int p = 0; p < H*W; p++) for (int c = 0; c < C; c++) in_mem[p][c] = act_t'(x[p*C + c]);
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int i = 0; i < nwords(DW, K, C, C, PAR); i++) begin
      wl_we = 1; wl_addr = 16'(i);
      for (int p = 0; p < PAR; p++) wl_data[p] = wgt_t'(wlane(DW, K, C, C, PAR, wn, i, p));
      @(negedge clk);
    end
    wl_we = 0;
    for (int g = 0; g < C / PAR; g++) begin
      bl_we = 1; bl_addr = 8'(g);
      for (int p = 0; p < PAR; p++) bl_data[p] = acc_t'(b[g*PAR + p]);
      @(negedge clk);
    end
    bl_we = 0;
    // tile available, downstream full
    in_valid = 1;
    repeat (50) begin
      @(negedge clk);
      if (stalled) stall_cycles++;
      checks++;
      if (busy) begin failures++; $display("FAIL: started while downstream full"); end
    end
    out_ready = 1;
    do begin @(negedge clk); cycles++; end while (!in_release);
    cycles++;
    @(negedge clk);
    in_valid = 0;
    exp_cycles = 1 + OH*OW*((C/PAR)*(K*K + 1) + 1);
    checks++;
    if (cycles != exp_cycles) begin failures++; $display("FAIL latency %0d exp %0d", cycles, exp_cycles); end
    checks++;
    if (stall_cycles != 50) begin failures++; $display("FAIL stalled seen %0d cycles", stall_cycles); end
    repeat (5) @(negedge clk);
    checks++;
    if (releases != 1 || commits != 1) begin
      failures++; $display("FAIL releases %0d commits %0d", releases, commits);
    end
    for (int p = 0; p < OH*OW; p++)
      for (int c = 0; c < C; c++) begin
        checks++;
        if (int'(out_mem[p][c]) != y[p*C + c]) begin
          failures++;
          if (failures < 10) $display("FAIL pixel %0d ch %0d got %0d exp %0d", p, c, out_mem[p][c], y[p*C+c]);
        end
      end
    $display("stage latency %0d cycles", cycles);
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
