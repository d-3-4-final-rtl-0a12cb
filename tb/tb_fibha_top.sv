// tb_fibha_top: end-to-end test of the FiBHA accelerator at its default configuration
// (no parameter overrides). The SESL part runs the first three MobileNetV2 layers
// (3x3 s2 convolution 3->32, depthwise 3x3 on 32, pointwise 32->16) on 19x19 input
// tiles; the SEML part runs the next bottleneck block from a layer table (pointwise
// 16->96, depthwise 3x3 stride 2 on 96, pointwise 96->24) with its weights in the
// off-chip memory model. Four random tiles are pushed through back to back and each
// 3x3x24 result tile is compared with the reference model.
// Every mechanism of the design is counted and must occur at least once: an SESL engine
// stalled by a full downstream buffer, the bridge buffer full, the SESL and SEML parts
// busy on different tiles at once, SEML weight fetches, a refused memory request,
// result back-pressure, and INT8 clipping at 0 (ReLU) and at 127 (saturation).
// The hybrid SESL/SEML flow follows the accelerator description; the SEML layer table
// (the next MobileNetV2 layers within 96 channels), shifts and data are this test's.
module tb_fibha_top;
  import fibha_pkg::*;
  import fibha_ref_pkg::*;

  localparam int TH = 19, TW = 19, C0 = 3, C1 = 32, C3 = 16, PARW = 32, SPAR = 16, CM = 96;
  localparam int NL = 8, NT = 4;
  localparam int H2 = 7, W2 = 7, HO = 3, WO = 3, CO = 24;
  localparam int PAR [3] = '{32, 8, 16};

  logic clk = 0, rst_n = 0;
  always #5 clk = !clk;

  logic in_ready, in_we, in_commit, wl_we, bl_we, mem_req, mem_gnt, mem_rvalid;
  logic out_valid, out_ready, out_last, bridge_full, seml_busy, seml_fetching;
  logic [8:0] in_waddr;
  act_t [C0-1:0] in_wdata;
  logic [2:0][4:0] sesl_shift;
  logic [1:0] wl_stage;
  logic [15:0] wl_addr;
  wgt_t [PARW-1:0] wl_data;
  logic [7:0] bl_addr;
  acc_t [PARW-1:0] bl_data;
  logic [3:0] num_layers, seml_layer;
  seml_layer_t layers [NL];
  logic [23:0] mem_addr;
  wgt_t [SPAR-1:0] mem_rdata;
  act_t [CM-1:0] out_data;
  logic [2:0] sesl_busy, sesl_stalled;

  fibha_top dut (.*);
  fibha_ext_mem_model #(.PAR(SPAR), .DEPTH(4096), .AW(24), .LAT(6)) u_mem (
    .clk, .rst_n, .req(mem_req), .addr(mem_addr), .gnt(mem_gnt), .rvalid(mem_rvalid), .rdata(mem_rdata));

  // SESL layers
  int s_lt [3] = '{STD, DW, PW};
  int s_k  [3] = '{3, 3, 1};
  int s_ci [3] = '{C0, C1, C1};
  int s_co [3] = '{C1, C1, C3};
  int s_sh [3] = '{9, 9, 10};
  // SEML layers
  int m_lt [3] = '{PW, DW, PW};
  int m_k  [3] = '{1, 3, 1};
  int m_s  [3] = '{1, 2, 1};
  int m_ci [3] = '{C3, 96, 96};
  int m_co [3] = '{96, 96, CO};
  int m_sh [3] = '{10, 9, 5};
  iarr_t sw [3], sb [3], mw [3], mb [3];
  iarr_t x [NT], y [NT];

  int checks = 0, failures = 0;
  int n_stall = 0, n_bridge_full = 0, n_overlap = 0, n_fetch = 0, n_mem_wait = 0, n_out_wait = 0;
  int n_zero = 0, n_sat = 0, n_tiles = 0;
  longint t_first_out = 0, t_end = 0;
  always_ff @(posedge clk) if (rst_n) begin
    if (|sesl_stalled) n_stall++;
    if (bridge_full) n_bridge_full++;
    if (|sesl_busy && seml_busy && seml_layer != 0) n_overlap++;
    if (seml_fetching) n_fetch++;
    if (mem_req && !mem_gnt) n_mem_wait++;
    if (out_valid && !out_ready) n_out_wait++;
  end

  task automatic sesl_load(int st);
    int lt, k, ci, co, par, cout;
    lt = s_lt[st]; k = s_k[st]; ci = s_ci[st]; co = s_co[st]; par = PAR[st];
    cout = (lt == DW) ? ci : co;
    for (int i = 0; i < nwords(lt, k, ci, co, par); i++) begin
      wl_we = 1; wl_stage = 2'(st); wl_addr = 16'(i); wl_data = '0;
      for (int p = 0; p < par; p++) wl_data[p] = wgt_t'(wlane(lt, k, ci, co, par, sw[st], i, p));
      @(negedge clk);
    end
    wl_we = 0;
    for (int g = 0; g < (cout + par - 1) / par; g++) begin
      bl_we = 1; wl_stage = 2'(st); bl_addr = 8'(g); bl_data = '0;
      for (int p = 0; p < par; p++) if (g*par + p < cout) bl_data[p] = acc_t'(sb[st][g*par + p]);
      @(negedge clk);
    end
    bl_we = 0;
  endtask

  initial begin
    int wa;
    // weights, biases and the reference results
    for (int i = 0; i < 3; i++) begin
      sw[i] = rand_arr((s_lt[i] == DW) ? s_ci[i]*9 : s_co[i]*s_k[i]*s_k[i]*s_ci[i], -128, 127);
      sb[i] = rand_arr((s_lt[i] == DW) ? s_ci[i] : s_co[i], -4000, 4000);
      mw[i] = rand_arr((m_lt[i] == DW) ? m_ci[i]*9 : m_co[i]*m_ci[i], -128, 127);
      mb[i] = rand_arr((m_lt[i] == DW) ? m_ci[i] : m_co[i], -4000, 4000);
    end
    for (int t = 0; t < NT; t++) begin
      iarr_t a;
      int h, w;
      x[t] = rand_arr(TH*TW*C0, -128, 127);
      a = x[t]; h = TH; w = TW;
      a = conv(STD, 3, 2, h, w, C0, C1, s_sh[0], a, sw[0], sb[0]); h = 9; w = 9;
      a = conv(DW, 3, 1, h, w, C1, C1, s_sh[1], a, sw[1], sb[1]);  h = 7; w = 7;
      a = conv(PW, 1, 1, h, w, C1, C3, s_sh[2], a, sw[2], sb[2]);
      for (int i = 0; i < 3; i++) begin
        a = conv(m_lt[i], m_k[i], m_s[i], h, w, m_ci[i], m_co[i], m_sh[i], a, mw[i], mb[i]);
        h = odim(h, m_k[i], m_s[i]); w = odim(w, m_k[i], m_s[i]);
      end
      y[t] = a;
    end
    // SEML layer table and off-chip memory image
    wa = 16;
    num_layers = 4'd3;
    for (int i = 0; i < NL; i++) layers[i] = '0;
    for (int i = 0; i < 3; i++) begin
      int nwd, g;
      acc_t [SPAR-1:0] bw;
      nwd = nwords(m_lt[i], m_k[i], m_ci[i], m_co[i], SPAR);
      g = (((m_lt[i] == DW) ? m_ci[i] : m_co[i]) + SPAR - 1) / SPAR;
      layers[i] = '{ltype: layer_type_e'(m_lt[i]), k: 2'(m_k[i]), stride: 2'(m_s[i]),
                    c_in: 10'(m_ci[i]), c_out: 10'(m_co[i]), shift: 5'(m_sh[i]),
                    w_base: 24'(wa), b_base: 24'(wa + nwd)};
      for (int j = 0; j < nwd; j++)
        for (int p = 0; p < SPAR; p++)
          u_mem.mem[wa + j][p] = wgt_t'(wlane(m_lt[i], m_k[i], m_ci[i], m_co[i], SPAR, mw[i], j, p));
      for (int gg = 0; gg < g; gg++) begin
        bw = '0;
        for (int p = 0; p < SPAR; p++) if (gg*SPAR + p < mb[i].size()) bw[p] = acc_t'(mb[i][gg*SPAR + p]);
        for (int q = 0; q < 4; q++) u_mem.mem[wa + nwd + gg*4 + q] = bw[q*SPAR/4 +: SPAR/4];
      end
      wa += nwd + 4*g + 32;
    end
    sesl_shift = {5'(s_sh[2]), 5'(s_sh[1]), 5'(s_sh[0])};
    in_we = 0; in_commit = 0; in_waddr = 0; in_wdata = '0;
    wl_we = 0; bl_we = 0; wl_stage = 0; wl_addr = 0; bl_addr = 0; wl_data = '0; bl_data = '0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int st = 0; st < 3; st++) sesl_load(st);
    // host pushes all tiles as fast as the input buffer allows
    for (int t = 0; t < NT; t++) begin
      while (!in_ready) @(negedge clk);
      for (int p = 0; p < TH*TW; p++) begin
        in_we = 1; in_waddr = 9'(p);
        for (int c = 0; c < C0; c++) in_wdata[c] = act_t'(x[t][p*C0 + c]);
        @(negedge clk);
      end
      in_we = 0; in_commit = 1;
      @(negedge clk);
      in_commit = 0;
    end
  end

  // result collector with random back-pressure
  initial begin
    out_ready = 0;
    @(posedge rst_n);
    for (int t = 0; t < NT; t++) begin
      for (int p = 0; p < HO*WO; p++) begin
        do begin
          @(negedge clk);
          out_ready = ($urandom_range(3) != 0);
          #1;
        end while (!(out_valid && out_ready));
        for (int c = 0; c < CM; c++) begin
          int e;
          e = (c < CO) ? y[t][p*CO + c] : 0;
          checks++;
          if (int'(out_data[c]) != e) begin
            failures++;
            if (failures < 10) $display("FAIL tile %0d pixel %0d ch %0d got %0d exp %0d", t, p, c, out_data[c], e);
          end
          if (c < CO && e == 0) n_zero++;
          if (c < CO && e == 127) n_sat++;
        end
        checks++;
        if (out_last != (p == HO*WO - 1)) begin failures++; $display("FAIL out_last tile %0d pixel %0d", t, p); end
      end
      n_tiles++;
      if (t == 0) t_first_out = $time / 10;
      @(negedge clk);
      out_ready = 0;
    end
    t_end = $time / 10;
    begin
      automatic string names [8] = '{"SESL engine stall", "bridge buffer full", "SESL/SEML overlap",
                           "SEML weight fetch", "memory grant wait", "result back-pressure",
                           "ReLU clip to 0", "saturation to 127"};
      automatic int counts [8];
      counts = '{n_stall, n_bridge_full, n_overlap, n_fetch, n_mem_wait, n_out_wait, n_zero, n_sat};
      for (int i = 0; i < 8; i++) begin
        checks++;
        $display("mechanism %-22s : %0d", names[i], counts[i]);
        if (counts[i] == 0) begin failures++; $display("FAIL: %s never happened", names[i]); end
      end
    end
    $display("tiles %0d, first result at cycle %0d, all results at cycle %0d", n_tiles, t_first_out, t_end);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (500000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
