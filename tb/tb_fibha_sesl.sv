// tb_fibha_sesl: the three-engine SESL pipeline (standard 3x3 s2, depthwise 3x3,
// pointwise) at reduced size. Eight random tiles are pushed in back to back; the
// testbench acts as the bridge buffer and holds it full for a while, so back-pressure
// ripples up the pipeline. Checks: every tile that leaves engine 2 equals the reference
// chain of three layers, tiles stay in order, all three engines were busy in the same
// cycle (pipelining) and every engine was stalled by its downstream buffer at least once.
// The pipelined per-layer engines follow the accelerator description; the reduced
// tile size and channel counts are this test's choices.
module tb_fibha_sesl;
  import fibha_pkg::*;
  import fibha_ref_pkg::*;

  localparam int TH = 11, TW = 11, C0 = 3, C1 = 8, C3 = 8, PAR0 = 8, PAR1 = 4, PAR2 = 4, NT = 8;
  localparam int SH0 = 9, SH1 = 8, SH2 = 9;
  localparam int H1 = (TH - 3) / 2 + 1, W1 = (TW - 3) / 2 + 1, H2 = H1 - 2, W2 = W1 - 2;
  logic clk = 0, rst_n = 0;
  always #5 clk = !clk;

  logic in_ready, in_we, in_commit, wl_we, bl_we, out_ready, out_we, out_commit;
  logic [$clog2(TH*TW)-1:0] in_waddr;
  act_t [C0-1:0] in_wdata;
  logic [1:0] wl_stage;
  logic [15:0] wl_addr;
  logic [7:0] bl_addr;
  wgt_t [PAR0-1:0] wl_data;
  acc_t [PAR0-1:0] bl_data;
  logic [$clog2(H2*W2)-1:0] out_waddr;
  act_t [C3-1:0] out_wdata;
  logic [2:0] stage_busy, stage_stalled;

  fibha_sesl #(.TILE_H(TH), .TILE_W(TW), .C0(C0), .C1(C1), .C3(C3), .PAR0(PAR0), .PAR1(PAR1),
               .PAR2(PAR2)) dut (.*, .shift({5'(SH2), 5'(SH1), 5'(SH0)}));

  act_t [C3-1:0] obuf [H2*W2];
  always_ff @(posedge clk) if (out_we) obuf[out_waddr] <= out_wdata;

  int checks = 0, failures = 0, all_busy = 0, tiles_out = 0;
  int stalls [3] = '{0, 0, 0};
  always_ff @(posedge clk) if (rst_n) begin
    if (&stage_busy) all_busy++;
    for (int i = 0; i < 3; i++) if (stage_stalled[i]) stalls[i]++;
  end

  iarr_t x [NT];
  iarr_t y [NT];
  iarr_t w0, w1, w2, b0, b1, b2;

  task automatic load(int st, int lt, int k, int ci, int co, int par, iarr_t wn, iarr_t b);
    int cout;
    cout = (lt == DW) ? ci : co;
    for (int i = 0; i < nwords(lt, k, ci, co, par); i++) begin
      wl_we = 1; wl_stage = 2'(st); wl_addr = 16'(i); wl_data = '0;
      for (int p = 0; p < par; p++) wl_data[p] = wgt_t'(wlane(lt, k, ci, co, par, wn, i, p));
      @(negedge clk);
    end
    wl_we = 0;
    for (int g = 0; g < (cout + par - 1) / par; g++) begin
      bl_we = 1; wl_stage = 2'(st); bl_addr = 8'(g); bl_data = '0;
      for (int p = 0; p < par; p++) if (g*par + p < cout) bl_data[p] = acc_t'(b[g*par + p]);
      @(negedge clk);
    end
    bl_we = 0;
  endtask

  // producer: host writing tiles
  initial begin
    in_we = 0; in_commit = 0; in_waddr = 0; in_wdata = '0;
    wl_we = 0; bl_we = 0; wl_stage = 0; wl_addr = 0; bl_addr = 0; wl_data = '0; bl_data = '0;
    w0 = rand_arr(C1*9*C0, -128, 127); b0 = rand_arr(C1, -4000, 4000);
    w1 = rand_arr(C1*9, -128, 127);    b1 = rand_arr(C1, -2000, 2000);
    w2 = rand_arr(C3*C1, -128, 127);   b2 = rand_arr(C3, -2000, 2000);
    for (int t = 0; t < NT; t++) begin
      iarr_t a, bb;
      x[t] = rand_arr(TH*TW*C0, -128, 127);
      a  = conv(STD, 3, 2, TH, TW, C0, C1, SH0, x[t], w0, b0);
      bb = conv(DW, 3, 1, H1, W1, C1, C1, SH1, a, w1, b1);
      y[t] = conv(PW, 1, 1, H2, W2, C1, C3, SH2, bb, w2, b2);
    end
    repeat (3) @(negedge clk);
    rst_n = 1;
    load(0, STD, 3, C0, C1, PAR0, w0, b0);
    load(1, DW, 3, C1, C1, PAR1, w1, b1);
    load(2, PW, 1, C1, C3, PAR2, w2, b2);
    for (int t = 0; t < NT; t++) begin
      while (!in_ready) @(negedge clk);
      for (int p = 0; p < TH*TW; p++) begin
        in_we = 1; in_waddr = 7'(p);
        for (int c = 0; c < C0; c++) in_wdata[c] = act_t'(x[t][p*C0 + c]);
        @(negedge clk);
      end
      in_we = 0; in_commit = 1;
      @(negedge clk);
      in_commit = 0;
    end
  end

  // consumer: the bridge buffer, held full for a long time after the second tile
  initial begin
    out_ready = 1;
    @(posedge rst_n);
    for (int t = 0; t < NT; t++) begin
      while (!out_commit) @(negedge clk);
      @(negedge clk);   // obuf updated
      for (int p = 0; p < H2*W2; p++)
        for (int c = 0; c < C3; c++) begin
          checks++;
          if (int'(obuf[p][c]) != y[t][p*C3 + c]) begin
            failures++;
            if (failures < 10) $display("FAIL tile %0d pixel %0d ch %0d got %0d exp %0d", t, p, c,
                                        obuf[p][c], y[t][p*C3 + c]);
          end
        end
      tiles_out++;
      // hold the bridge full again between some tiles
      if (t == 1) begin out_ready = 0; repeat (4000) @(negedge clk); out_ready = 1; end
    end
    checks++;
    if (all_busy == 0) begin failures++; $display("FAIL: engines never all busy together"); end
    for (int i = 0; i < 3; i++) begin
      checks++;
      if (stalls[i] == 0) begin failures++; $display("FAIL: engine %0d never stalled", i); end
    end
    $display("tiles %0d, cycles with all engines busy %0d, stall cycles %0d/%0d/%0d",
             tiles_out, all_busy, stalls[0], stalls[1], stalls[2]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
