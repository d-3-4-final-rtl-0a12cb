// tb_fibha_seml: the SEML part at reduced size running a three-layer table
// (pointwise 8->24, depthwise 3x3 on 24 channels, pointwise 24->16) on two tiles taken
// from a testbench-modelled bridge buffer, with weights in the off-chip memory model
// (random grant, 4-cycle latency) and random back-pressure on the result stream.
// Checks: result pixels against the reference chain, out_last on the last pixel, the
// bridge released exactly once per tile and right after layer 0, that the engine's local
// buffers alternate (3 layers need both), and that the number of memory reads equals the
// weight and bias words of all layers.
// Layer-by-layer execution, alternating buffers and off-chip weights follow the
// accelerator description; layer shapes and sizes are this test's choices.
module tb_fibha_seml;
  import fibha_pkg::*;
  import fibha_ref_pkg::*;

  localparam int H = 5, W = 5, CS = 8, CM = 24, PAR = 8, NL = 4, NT = 2;
  logic clk = 0, rst_n = 0;
  always #5 clk = !clk;

  logic [2:0] num_layers;
  seml_layer_t layers [NL];
  logic src_valid, src_release, mem_req, mem_gnt, mem_rvalid, out_valid, out_ready, out_last;
  logic busy, fetching;
  logic [2:0] layer_idx;
  logic [4:0] src_raddr;
  act_t [CS-1:0] src_rdata;
  logic [23:0] mem_addr;
  wgt_t [PAR-1:0] mem_rdata;
  act_t [CM-1:0] out_data;
  act_t [CS-1:0] src_mem [H*W];
  assign src_rdata = src_mem[src_raddr];

  fibha_seml #(.H_IN(H), .W_IN(W), .C_SRC(CS), .C_MAX(CM), .PAR(PAR), .NL_MAX(NL),
               .WDEPTH(256), .BDEPTH(4), .EXT_AW(24)) dut (.*);
  fibha_ext_mem_model #(.PAR(PAR), .DEPTH(2048), .AW(24), .LAT(4)) u_mem (
    .clk, .rst_n, .req(mem_req), .addr(mem_addr), .gnt(mem_gnt), .rvalid(mem_rvalid), .rdata(mem_rdata));

  // layer table: type, k, stride, c_in, c_out, shift
  int lt [3] = '{PW, DW, PW};
  int lk [3] = '{1, 3, 1};
  int lci [3] = '{CS, 24, 24};
  int lco [3] = '{24, 24, 16};
  int lsh [3] = '{9, 9, 10};
  iarr_t wn [3];
  iarr_t bs [3];

  int checks = 0, failures = 0, releases = 0, release_layer_ok = 1, expect_reads = 0;
  always_ff @(posedge clk) if (src_release) begin
    releases++;
    if (layer_idx != 0) release_layer_ok = 0;
  end

  initial begin
    int wa;
    iarr_t x, y, a, b2;
    num_layers = 3;
    wa = 0;
    for (int i = 0; i < NL; i++) layers[i] = '0;
    for (int i = 0; i < 3; i++) begin
      int nwd, g;
      acc_t [PAR-1:0] bw;
      wn[i] = rand_arr((lt[i] == DW) ? lci[i]*9 : lco[i]*lci[i], -128, 127);
      bs[i] = rand_arr((lt[i] == DW) ? lci[i] : lco[i], -3000, 3000);
      nwd = nwords(lt[i], lk[i], lci[i], lco[i], PAR);
      g = (((lt[i] == DW) ? lci[i] : lco[i]) + PAR - 1) / PAR;
      layers[i] = '{ltype: layer_type_e'(lt[i]), k: 2'(lk[i]), stride: 2'd1, c_in: 10'(lci[i]),
                    c_out: 10'(lco[i]), shift: 5'(lsh[i]), w_base: 24'(wa), b_base: 24'(wa + nwd)};
      for (int j = 0; j < nwd; j++)
        for (int p = 0; p < PAR; p++)
          u_mem.mem[wa + j][p] = wgt_t'(wlane(lt[i], lk[i], lci[i], lco[i], PAR, wn[i], j, p));
      for (int gg = 0; gg < g; gg++) begin
        bw = '0;
        for (int p = 0; p < PAR; p++) if (gg*PAR + p < bs[i].size()) bw[p] = acc_t'(bs[i][gg*PAR + p]);
        for (int q = 0; q < 4; q++) u_mem.mem[wa + nwd + gg*4 + q] = bw[q*PAR/4 +: PAR/4];
      end
      expect_reads += nwd + 4*g;
      wa += nwd + 4*g + 5;
    end
    src_valid = 0; out_ready = 0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int t = 0; t < NT; t++) begin
      x = rand_arr(H*W*CS, -128, 127);
      for (int p = 0; p < H*W; p++) for (int c = 0; c < CS; c++) src_mem[p][c] = act_t'(x[p*CS + c]);
      a  = conv(PW, 1, 1, H, W, CS, 24, lsh[0], x, wn[0], bs[0]);
      b2 = conv(DW, 3, 1, H, W, 24, 24, lsh[1], a, wn[1], bs[1]);
      y  = conv(PW, 1, 1, H - 2, W - 2, 24, 16, lsh[2], b2, wn[2], bs[2]);
      @(negedge clk);
      src_valid = 1;
      while (!src_release) @(negedge clk);
      @(negedge clk);
      src_valid = 0;
      // collect the result stream
      for (int p = 0; p < (H - 2)*(W - 2); p++) begin
        out_ready = 0;
        do begin
          @(negedge clk);
          out_ready = ($urandom_range(2) != 0);
          #1;
        end while (!(out_valid && out_ready));
        for (int c = 0; c < CM; c++) begin
          int e;
          e = (c < 16) ? y[p*16 + c] : 0;
          checks++;
          if (int'(out_data[c]) != e) begin
            failures++;
            if (failures < 10) $display("FAIL tile %0d pixel %0d ch %0d got %0d exp %0d", t, p, c, out_data[c], e);
          end
        end
        checks++;
        if (out_last != (p == (H - 2)*(W - 2) - 1)) begin failures++; $display("FAIL out_last at %0d", p); end
        @(negedge clk);
        out_ready = 0;
      end
    end
    repeat (3) @(negedge clk);
    checks++;
    if (busy) begin failures++; $display("FAIL: still busy"); end
    checks++;
    if (releases != NT || !release_layer_ok) begin
      failures++; $display("FAIL: %0d bridge releases (layer ok %0d)", releases, release_layer_ok);
    end
    checks++;
    if (u_mem.n_reads != NT*expect_reads) begin
      failures++; $display("FAIL: %0d memory reads, expected %0d", u_mem.n_reads, NT*expect_reads);
    end
    $display("memory reads %0d", u_mem.n_reads);
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
