// tb_stann_fft_frontend: the arc-detection feature front end at its default size
// (160-sample frames split 128 + 32). Three frames of random samples are streamed in back
// to back with random input gaps; the 160 spectrum magnitudes of each frame are compared
// with magnitudes computed here from a double-precision DFT of the corresponding 128 or
// 32 samples (same estimate max + min/2, within 200 LSB for the 128-point and 60 LSB for the
// 32-point spectrum, against magnitudes of up to about 2e6),
// spec_last must mark exactly the 160th value, and random output stalls must not lose
// or repeat a value. Also checks that a later frame's samples are accepted while the
// previous frame's spectrum is still being emitted (overlap of frames).
// The 128/32 split follows the published classifier; everything else is this design's.
module tb_stann_fft_frontend;
  localparam int DW = 16, NA = 128, NB = 32, NF = 3;

  logic clk, rst_n;
  initial clk = 1'b0;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL: %s", what);
    end
  endtask

  logic in_valid, in_ready, spec_valid, spec_ready, spec_last;
  logic signed [DW-1:0] in_data;
  logic [DW+8-1:0] spec_data;

  stann_fft_frontend u_dut (.clk, .rst_n, .in_valid, .in_ready, .in_data,
    .spec_valid, .spec_ready, .spec_data, .spec_last);

  int x [NF][NA+NB];
  int overlap = 0;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // expected magnitude estimate of bin k of the n-point DFT of x[f][off +: n]
  function automatic real est(int f, int off, int n, int k);
    real dr, di, ang, ar, ai;
    dr = 0.0; di = 0.0;
    for (int i = 0; i < n; i++) begin
      ang = -2.0 * 3.14159265358979 * ((k * i) % n) / n;
      dr += x[f][off + i] * $cos(ang);
      di += x[f][off + i] * $sin(ang);
    end
    ar = dr < 0.0 ? -dr : dr;
    ai = di < 0.0 ? -di : di;
    return (ar > ai) ? ar + ai / 2.0 : ai + ar / 2.0;
  endfunction

  // producer
  initial begin
    for (int f = 0; f < NF; f++)
      for (int i = 0; i < NA + NB; i++) x[f][i] = int'($signed(16'($urandom)));
    in_valid = 1'b0; in_data = '0; rst_n = 1'b0;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    for (int f = 0; f < NF; f++)
      for (int i = 0; i < NA + NB; i++) begin
        while ($urandom_range(0, 4) == 0) @(negedge clk);
        @(negedge clk);
        in_valid = 1'b1; in_data = DW'(x[f][i]);
        @(posedge clk);
        while (!in_ready) @(posedge clk);
        if (spec_valid) overlap++;
        @(negedge clk);
        in_valid = 1'b0;
      end
  end

  // consumer
  initial begin
    int got;
    real e, tol;
    spec_ready = 1'b0;
    @(posedge rst_n);
    for (int f = 0; f < NF; f++) begin
      got = 0;
      while (got < NA + NB) begin
        @(negedge clk);
        spec_ready = ($urandom_range(0, 3) != 0);
        @(posedge clk);
        if (spec_valid && spec_ready) begin
          if (got < NA) begin
            e   = est(f, 0, NA, got);
            tol = 200.0;
          end else begin
            e   = est(f, NA, NB, got - NA);
            tol = 60.0;
          end
          check((real'(spec_data) - e) < tol && (e - real'(spec_data)) < tol,
                $sformatf("frame %0d value %0d: got %0d expected %.1f", f, got, spec_data, e));
          check(spec_last == (got == NA + NB - 1), $sformatf("frame %0d value %0d spec_last", f, got));
          got++;
        end
      end
    end
    @(negedge clk);
    spec_ready = 1'b0;
    repeat (20) @(posedge clk);
    check(!spec_valid, "no extra spectrum values");
    check(overlap > 0, "next frame accepted while a spectrum was being emitted");
    $display("overlap cycles %0d", overlap);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
