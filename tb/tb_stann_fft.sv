// tb_stann_fft: the two FFT sizes of the arc-detection front end, N = 128 and N = 32, at
// their default widths. Each instance transforms three frames (random full-scale samples,
// a pure tone on bin 5, random small samples); every output bin is compared with a DFT
// computed here in double precision, within a tolerance that covers twiddle rounding and
// rounding (4 + N/8 + sum|x| * LOGN / 4096). The magnitude output is checked against
// max(|re|,|im|) + min(|re|,|im|)/2 of the bin's own re/im, the tone frame must put its
// energy on bins 5 and N-5, and the compute time must be LOGN*N/2 cycles. The output
// is stalled at random to check that a bin holds until taken.
// The two transform sizes follow the published classifier; the fixed-point format and
// the tolerance are this design's choices.
module tb_stann_fft;
  localparam int DW = 16;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL: %s", what);
    end
  endtask

  // ---------------- N = 128 ----------------
  logic a_iv, a_ir, a_ov, a_or, a_last, a_busy;
  logic signed [DW-1:0] a_id;
  logic signed [DW+8-1:0] a_re, a_im;
  logic [DW+8-1:0] a_mag;
  stann_fft #(.N(128)) u_a (.clk, .rst_n, .in_valid(a_iv), .in_ready(a_ir), .in_data(a_id),
    .out_valid(a_ov), .out_ready(a_or), .out_re(a_re), .out_im(a_im), .out_mag(a_mag),
    .out_last(a_last), .busy(a_busy));

  // ---------------- N = 32 ----------------
  logic b_iv, b_ir, b_ov, b_or, b_last, b_busy;
  logic signed [DW-1:0] b_id;
  logic signed [DW+6-1:0] b_re, b_im;
  logic [DW+6-1:0] b_mag;
  stann_fft #(.N(32)) u_b (.clk, .rst_n, .in_valid(b_iv), .in_ready(b_ir), .in_data(b_id),
    .out_valid(b_ov), .out_ready(b_or), .out_re(b_re), .out_im(b_im), .out_mag(b_mag),
    .out_last(b_last), .busy(b_busy));

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic longint iabs(longint v);
    return v < 0 ? -v : v;
  endfunction

  // One frame through instance A (n = 128) or B (n = 32).
  task automatic run_frame(bit sel, int n, int kind);
    int x[];
    real dr, di, tol, ang;
    longint sabs, re, im, mag, ar, ai, hi, lo;
    int logn, busy_cyc, k;
    bit hold;
    x = new[n];
    logn = $clog2(n);
    sabs = 0;
    for (int i = 0; i < n; i++) begin
      case (kind)
        0: x[i] = int'($signed(16'($urandom)));
        1: x[i] = $rtoi(8000.0 * $cos(2.0 * 3.14159265358979 * 5 * i / n));
        default: x[i] = int'($urandom_range(0, 40)) - 20;
      endcase
      sabs += iabs(longint'(x[i]));
    end
    tol = 4.0 + n / 8.0 + real'(sabs) * logn / 4096.0;
    // load
    for (int i = 0; i < n; i++) begin
      if (sel) begin b_iv <= 1'b1; b_id <= DW'(x[i]); end
      else     begin a_iv <= 1'b1; a_id <= DW'(x[i]); end
      @(posedge clk);
      while (!(sel ? b_ir : a_ir)) @(posedge clk);
    end
    a_iv <= 1'b0; b_iv <= 1'b0;
    // compute time
    busy_cyc = 0;
    @(negedge clk);
    while (sel ? b_busy : a_busy) begin busy_cyc++; @(negedge clk); end
    check(busy_cyc == logn * n / 2, $sformatf("N=%0d compute cycles %0d, expected %0d", n, busy_cyc, logn * n / 2));
    // collect
    k = 0;
    while (k < n) begin
      hold = ($urandom_range(0, 3) == 0) ? 1'b1 : 1'b0;
      @(negedge clk);
      if (sel) b_or = !hold; else a_or = !hold;
      #1;
      if (sel ? b_ov : a_ov) begin
        re  = sel ? longint'(b_re) : longint'(a_re);
        im  = sel ? longint'(b_im) : longint'(a_im);
        mag = sel ? longint'(b_mag) : longint'(a_mag);
        if (!hold) begin
          dr = 0.0; di = 0.0;
          for (int i = 0; i < n; i++) begin
            ang = -2.0 * 3.14159265358979 * ((k * i) % n) / n;
            dr += x[i] * $cos(ang);
            di += x[i] * $sin(ang);
          end
          check((re - dr) < tol && (dr - re) < tol && (im - di) < tol && (di - im) < tol,
                $sformatf("N=%0d frame %0d bin %0d: got %0d,%0dj, expected %.1f,%.1fj (tol %.1f)",
                          n, kind, k, re, im, dr, di, tol));
          ar = iabs(re); ai = iabs(im);
          hi = ar > ai ? ar : ai; lo = ar > ai ? ai : ar;
          check(mag == hi + lo / 2, $sformatf("N=%0d bin %0d magnitude %0d", n, k, mag));
          check((sel ? b_last : a_last) == (k == n - 1), $sformatf("N=%0d bin %0d out_last", n, k));
          if (kind == 1)
            check(((k == 5 || k == n - 5) ? mag > 8000 * n / 4 : mag < 8000 * n / 64),
                  $sformatf("N=%0d tone: bin %0d magnitude %0d", n, k, mag));
          k++;
        end
      end
    end
    @(negedge clk);
    if (sel) b_or = 1'b0; else a_or = 1'b0;
  endtask

  initial begin
    a_iv = 1'b0; b_iv = 1'b0; a_or = 1'b0; b_or = 1'b0; a_id = '0; b_id = '0;
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    @(posedge clk);
    for (int f = 0; f < 3; f++) begin
      run_frame(1'b0, 128, f);
      run_frame(1'b1, 32, f);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
