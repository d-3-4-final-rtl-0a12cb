// tb_fibha_conv_engine: runs the convolution engine on random INT8 tiles for the three
// layer types (standard 3x3 stride 2, depthwise 3x3 stride 1 and stride 2, pointwise with
// a channel count that leaves a partly used lane group) and compares every output pixel
// with the reference model. It also checks the tile latency,
// OH*OW*(G*(K*K*NIC+1)+1) busy cycles, and that ReLU clipping at 0 and saturation at
// 127 both occur.
// The three convolution types follow the accelerator description; the tile sizes and
// the latency formula checked are this design's.
module tb_fibha_conv_engine;
  import fibha_pkg::*;
  import fibha_ref_pkg::*;

  localparam int H_MAX = 9, W_MAX = 9, CI_MAX = 8, CO_MAX = 8, PAR = 4, WDEPTH = 512, BDEPTH = 4;
  localparam int PIXAW = $clog2(H_MAX*W_MAX);

  logic clk = 0, rst_n = 0;
  always #5 clk = !clk;

  logic start, busy, done, out_we;
  layer_cfg_t cfg;
  logic [PIXAW-1:0] in_raddr, out_waddr;
  logic [8:0] w_raddr;
  logic [1:0] b_raddr;
  act_t [CI_MAX-1:0] in_rdata;
  wgt_t [PAR-1:0] w_rdata;
  acc_t [PAR-1:0] b_rdata;
  act_t [CO_MAX-1:0] out_wdata;

  act_t [CI_MAX-1:0] in_mem [H_MAX*W_MAX];
  wgt_t [PAR-1:0]    w_mem  [WDEPTH];
  acc_t [PAR-1:0]    b_mem  [BDEPTH];
  act_t [CO_MAX-1:0] out_mem [H_MAX*W_MAX];

  assign in_rdata = in_mem[in_raddr];
  assign w_rdata  = w_mem[w_raddr];
  assign b_rdata  = b_mem[b_raddr];
  always_ff @(posedge clk) if (out_we) out_mem[out_waddr] <= out_wdata;

  fibha_conv_engine #(.H_MAX(H_MAX), .W_MAX(W_MAX), .CI_MAX(CI_MAX), .CO_MAX(CO_MAX),
                      .PAR(PAR), .WDEPTH(WDEPTH), .BDEPTH(BDEPTH)) dut (.*);

  int checks = 0, failures = 0, n_zero = 0, n_sat = 0;

  task automatic run_layer(int lt, int k, int s, int h, int w, int ci, int co, int shift);
    iarr_t x, wn, b, y;
    int oh, ow, cout, g, nic, exp_cycles, cycles;
    cout = (lt == DW) ? ci : co;
    x  = rand_arr(h*w*ci, -128, 127);
    wn = rand_arr((lt == DW) ? ci*k*k : co*k*k*ci, -128, 127);
    b  = rand_arr(cout, -3000, 3000);
    foreach (in_mem[i]) in_mem[i] = '0;
    for (int p = 0; p < h*w; p++)
      for (int c = 0; c < ci; c++) in_mem[p][c] = act_t'(x[p*ci + c]);
    for (int i = 0; i < nwords(lt, k, ci, co, PAR); i++)
      for (int p = 0; p < PAR; p++) w_mem[i][p] = wgt_t'(wlane(lt, k, ci, co, PAR, wn, i, p));
    foreach (b_mem[i]) b_mem[i] = '0;
    for (int c = 0; c < cout; c++) b_mem[c / PAR][c % PAR] = acc_t'(b[c]);
    y = conv(lt, k, s, h, w, ci, co, shift, x, wn, b);

    @(negedge clk);
    cfg = '{ltype: layer_type_e'(lt), k: 2'(k), stride: 2'(s), h_in: 8'(h), w_in: 8'(w),
            c_in: 10'(ci), c_out: 10'(cout), shift: 5'(shift)};
    start = 1;
    @(negedge clk);
    start = 0;
    cycles = 0;
    while (!done) begin @(negedge clk); cycles++; end
    cycles++;   // the done cycle itself is busy
    @(negedge clk);
    oh = odim(h, k, s); ow = odim(w, k, s);
    g = (cout + PAR - 1) / PAR; nic = (lt == DW) ? 1 : ci;
    exp_cycles = oh*ow*(g*(k*k*nic + 1) + 1);
    checks++;
    if (cycles != exp_cycles) begin
      failures++; $display("FAIL latency lt=%0d: %0d cycles, expected %0d", lt, cycles, exp_cycles);
    end
    checks++;
    if (busy) begin failures++; $display("FAIL busy after done"); end
    for (int p = 0; p < oh*ow; p++)
      for (int c = 0; c < cout; c++) begin
        checks++;
        if (int'(out_mem[p][c]) != y[p*cout + c]) begin
          failures++;
          if (failures < 10) $display("FAIL lt=%0d pixel %0d ch %0d: got %0d exp %0d", lt, p, c,
                                      out_mem[p][c], y[p*cout + c]);
        end
        if (y[p*cout + c] == 0) n_zero++;
        if (y[p*cout + c] == 127) n_sat++;
      end
    $display("layer type %0d k%0d s%0d %0dx%0dx%0d -> %0dx%0dx%0d: %0d cycles", lt, k, s,
             h, w, ci, oh, ow, cout, cycles);
  endtask

  initial begin
    start = 0; cfg = '0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    run_layer(STD, 3, 2, 9, 9, 3, 8, 10);
    run_layer(DW,  3, 1, 7, 7, 8, 8, 8);
    run_layer(DW,  3, 2, 9, 9, 8, 8, 8);
    run_layer(PW,  1, 1, 5, 5, 8, 6, 11);
    run_layer(STD, 3, 1, 6, 6, 5, 7, 12);
    checks++;
    if (n_zero == 0 || n_sat == 0) begin
      failures++; $display("FAIL: clipping not exercised (%0d zeros, %0d saturations)", n_zero, n_sat);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
