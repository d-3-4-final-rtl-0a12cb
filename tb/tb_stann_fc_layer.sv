// tb_stann_fc_layer: one systolic fully connected layer (20 inputs, 10 outputs, 4 PEs, so
// the last block is only half used) on four random vectors against the reference model.
// The first vector runs without back-pressure and its latency is checked against
// N_IN + NBLK*(N_IN + 2*PE); later vectors see random back-pressure on the output.
// Both ReLU clipping and saturation must occur.
// Block matrix multiplication on PEs follows the published classifier; the fixed-point
// format and the reduced size are this test's choices.
module tb_stann_fc_layer;
  import stann_ref_pkg::*;
  localparam int N_IN = 20, N_OUT = 10, PE = 4, DW = 16, FRAC = 6, NV = 4;
  localparam int NBLK = (N_OUT + PE - 1) / PE;
  logic clk = 0, rst_n = 0;
  always #5 clk = !clk;
  logic w_we, b_we, in_valid, in_ready, out_valid, out_ready;
  logic [7:0] w_addr;
  logic [3:0] b_addr;
  logic signed [DW-1:0] w_data, b_data, in_data, out_data;

  stann_fc_layer #(.N_IN(N_IN), .N_OUT(N_OUT), .PE(PE), .DW(DW), .FRAC(FRAC), .RELU(1'b1)) dut (.*);

  iarr_t w, b;
  iarr_t x [NV];
  iarr_t y [NV];
  int checks = 0, failures = 0, n_zero = 0, n_sat = 0;
  longint t_in0 = -1, t_out0 = -1, cyc = 0;
  always_ff @(posedge clk) cyc <= cyc + 1;

  initial begin
    w = rand_arr(N_IN*N_OUT, -1000, 1000);
    b = rand_arr(N_OUT, -200, 200);
    for (int v = 0; v < NV; v++) begin
      x[v] = rand_arr(N_IN, -2000, 2000);
      y[v] = fc(N_IN, N_OUT, FRAC, DW, 1'b1, x[v], w, b);
    end
    w_we = 0; b_we = 0; w_addr = 0; b_addr = 0; w_data = 0; b_data = 0; in_valid = 0; in_data = 0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int i = 0; i < N_IN*N_OUT; i++) begin
      w_we = 1; w_addr = 8'(i); w_data = DW'(w[i]); @(negedge clk);
    end
    w_we = 0;
    for (int i = 0; i < N_OUT; i++) begin
      b_we = 1; b_addr = 4'(i); b_data = DW'(b[i]); @(negedge clk);
    end
    b_we = 0;
    for (int v = 0; v < NV; v++)
      for (int i = 0; i < N_IN; i++) begin
        in_valid = 1; in_data = DW'(x[v][i]);
        #1;
        while (!in_ready) begin @(negedge clk); #1; end
        if (v == 0 && i == 0) t_in0 = cyc;
        @(negedge clk);
      end
    in_valid = 0;
  end

  initial begin
    out_ready = 1;
    @(posedge rst_n);
    for (int v = 0; v < NV; v++)
      for (int o = 0; o < N_OUT; o++) begin
        #1;
        while (!(out_valid && out_ready)) begin
          @(negedge clk);
          out_ready = (v == 0) ? 1'b1 : ($urandom_range(2) != 0);
          #1;
        end
        checks++;
        if (int'(out_data) != y[v][o]) begin
          failures++; $display("FAIL vec %0d out %0d got %0d exp %0d", v, o, out_data, y[v][o]);
        end
        if (y[v][o] == 0) n_zero++;
        if (y[v][o] == 32767) n_sat++;
        if (v == 0 && o == N_OUT - 1) t_out0 = cyc;
        @(negedge clk);
        out_ready = (v == 0) ? 1'b1 : ($urandom_range(2) != 0);
      end
    checks++;
    if (t_out0 - t_in0 + 1 != N_IN + NBLK*(N_IN + 2*PE) - (NBLK*PE - N_OUT)) begin
      failures++;
      $display("FAIL latency %0d exp %0d", t_out0 - t_in0 + 1, N_IN + NBLK*(N_IN + 2*PE) - (NBLK*PE - N_OUT));
    end
    checks++;
    if (n_zero == 0 || n_sat == 0) begin failures++; $display("FAIL: clip %0d sat %0d", n_zero, n_sat); end
    $display("latency of first vector %0d cycles", t_out0 - t_in0 + 1);
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
