// tb_stann_mlp: the four-layer classifier at its default size (320-64-32-16-2, 4 PEs per
// layer). Three random feature vectors are streamed in back to back and the two class
// scores of each are compared with the reference chain. Checks that the layers overlap
// as a dataflow pipeline: the first layer accepts vector n+1 while later layers are still
// working on vector n.
// Four chained layers with 320 inputs follow the published classifier; hidden widths
// and the fixed-point format are this design's choices.
module tb_stann_mlp;
  import stann_ref_pkg::*;
  localparam int N0 = 320, N1 = 64, N2 = 32, N3 = 16, N4 = 2, DW = 16, FRAC = 8, NV = 3;
  logic clk = 0, rst_n = 0;
  always #5 clk = !clk;
  logic [1:0] w_layer;
  logic w_we, b_we, in_valid, in_ready, out_valid, out_ready;
  logic [15:0] w_addr;
  logic [7:0] b_addr;
  logic signed [DW-1:0] w_data, b_data, in_data, out_data;

  stann_mlp dut (.*);

  int n [5] = '{N0, N1, N2, N3, N4};
  iarr_t w [4], b [4];
  iarr_t x [NV], y [NV];
  int checks = 0, failures = 0, overlap = 0;

  // layer 0 accepting input while layer 1 or later still produces output
  always_ff @(posedge clk) if (rst_n && in_valid && in_ready && (dut.v1 || dut.v2 || dut.v3 || out_valid)) overlap++;

  initial begin
    for (int l = 0; l < 4; l++) begin
      w[l] = rand_arr(n[l]*n[l+1], -40, 40);
      b[l] = rand_arr(n[l+1], -100, 100);
    end
    for (int v = 0; v < NV; v++) begin
      iarr_t a;
      x[v] = rand_arr(N0, -256, 256);
      a = x[v];
      for (int l = 0; l < 4; l++) a = fc(n[l], n[l+1], FRAC, DW, (l < 3), a, w[l], b[l]);
      y[v] = a;
    end
    w_layer = 0; w_we = 0; b_we = 0; w_addr = 0; b_addr = 0; w_data = 0; b_data = 0;
    in_valid = 0; in_data = 0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int l = 0; l < 4; l++) begin
      for (int i = 0; i < n[l]*n[l+1]; i++) begin
        w_layer = 2'(l); w_we = 1; w_addr = 16'(i); w_data = DW'(w[l][i]); @(negedge clk);
      end
      w_we = 0;
      for (int i = 0; i < n[l+1]; i++) begin
        w_layer = 2'(l); b_we = 1; b_addr = 8'(i); b_data = DW'(b[l][i]); @(negedge clk);
      end
      b_we = 0;
    end
    for (int v = 0; v < NV; v++)
      for (int i = 0; i < N0; i++) begin
        in_valid = 1; in_data = DW'(x[v][i]);
        #1;
        while (!in_ready) begin @(negedge clk); #1; end
        @(negedge clk);
      end
    in_valid = 0;
  end

  initial begin
    out_ready = 1;
    @(posedge rst_n);
    for (int v = 0; v < NV; v++)
      for (int o = 0; o < N4; o++) begin
        #1;
        while (!out_valid) begin @(negedge clk); #1; end
        checks++;
        if (int'(out_data) != y[v][o]) begin
          failures++; $display("FAIL vec %0d class %0d got %0d exp %0d", v, o, out_data, y[v][o]);
        end
        $display("vector %0d class %0d score %0d", v, o, out_data);
        @(negedge clk);
      end
    checks++;
    if (overlap == 0) begin failures++; $display("FAIL: layers never overlapped"); end
    $display("cycles with input accepted while later layers busy: %0d", overlap);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
