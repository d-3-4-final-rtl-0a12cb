// stann_fft: N-point radix-2 FFT of real samples, the feature front end of the STANN
// arc-detection classifier (one instance with N = 128 for the first 128 samples of a
// 160-sample frame, one with N = 32 for the last 32).
//
// Operation: N real samples arrive on in_valid/in_ready/in_data and are stored at their
// bit-reversed address. The transform then runs in place, decimation in time, LOGN
// stages of N/2 butterflies with one butterfly per cycle (one complex multiplier):
// in stage s (span h = 2^s) butterfly b combines X[i0] and X[i1 = i0 + h], with
// i0 = (b >> s)*2h + (b mod h) and twiddle W = exp(-2*pi*j*k/N), k = (b mod h)*N/(2h):
//   t = W*X[i1],  X[i0] <- X[i0] + t,  X[i1] <- X[i0] - t.
// Finally the N bins are streamed out in order on out_valid/out_ready, each with its real
// and imaginary part and a magnitude estimate max(|re|,|im|) + min(|re|,|im|)/2 that
// serves as the one real feature per bin.
// Numbers: samples are signed DW-bit integers; the datapath is IW = DW + LOGN + 1 bits
// wide so no stage can overflow; twiddles are signed TW-bit with TW-2 fraction bits,
// computed at elaboration from $cos/$sin; t is rounded back to IW bits (add half,
// arithmetic shift). Timing: N load cycles (without input stalls), LOGN*N/2 compute
// cycles, then N output beats; in_ready is high only while loading.
// That the arc-detection network takes spectra of the first 128 and the last 32 samples
// follows the published classifier; the published design computes them in floating
// point. The radix-2 architecture, the fixed-point widths and the magnitude estimate are
// this design's choices.
module stann_fft #(
  parameter int unsigned N  = 128,
  parameter int unsigned DW = 16,
  parameter int unsigned TW = 16,
  localparam int unsigned LOGN = $clog2(N),
  localparam int unsigned IW   = DW + LOGN + 1
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 in_valid,
  output logic                 in_ready,
  input  logic signed [DW-1:0] in_data,
  output logic                 out_valid,
  input  logic                 out_ready,
  output logic signed [IW-1:0] out_re,
  output logic signed [IW-1:0] out_im,
  output logic        [IW-1:0] out_mag,
  output logic                 out_last,
  output logic                 busy
);

  typedef logic signed [TW-1:0] tw_t;
  typedef tw_t tw_tab_t [N/2];

  function automatic tw_tab_t make_cos();
    tw_tab_t t;
    for (int k = 0; k < N/2; k++)
      t[k] = tw_t'($rtoi($floor($cos(2.0 * 3.14159265358979 * k / N) * (2.0 ** (TW-2)) + 0.5)));
    return t;
  endfunction
  function automatic tw_tab_t make_msin();
    tw_tab_t t;
    for (int k = 0; k < N/2; k++)
      t[k] = tw_t'($rtoi($floor(-$sin(2.0 * 3.14159265358979 * k / N) * (2.0 ** (TW-2)) + 0.5)));
    return t;
  endfunction
  localparam tw_tab_t WCOS  = make_cos();
  localparam tw_tab_t WMSIN = make_msin();   // imaginary part of W = -sin

  typedef enum logic [1:0] {S_LOAD, S_CALC, S_OUT} state_e;
  state_e state;

  logic signed [IW-1:0] xr [N];
  logic signed [IW-1:0] xi [N];
  logic [LOGN-1:0]      cnt;    // load index, butterfly index or output index
  logic [$clog2(LOGN+1)-1:0] stg;

  function automatic logic [LOGN-1:0] bitrev(logic [LOGN-1:0] a);
    for (int i = 0; i < LOGN; i++) bitrev[i] = a[LOGN-1-i];
  endfunction

  // ---------------- butterfly addressing ----------------
  logic [LOGN-1:0] bfly, jj, i0, i1, hmask;
  logic [LOGN-2:0] kk;                            // twiddle index 0 .. N/2-1
  always_comb begin
    bfly  = {1'b0, cnt[LOGN-2:0]};                 // 0 .. N/2-1
    hmask = LOGN'((1 << stg) - 1);
    jj    = bfly & hmask;
    i0    = LOGN'(((bfly >> stg) << (stg + 1)) | jj);
    i1    = LOGN'(i0 | (LOGN'(1) << stg));
    kk    = (LOGN-1)'(jj << (LOGN - 1 - int'(stg)));
  end

  // t = W * X[i1]
  localparam int unsigned PW = IW + TW;
  logic signed [PW-1:0] pr, pi;
  logic signed [IW-1:0] tr, ti;
  always_comb begin
    pr = PW'(xr[i1]) * PW'(WCOS[kk]) - PW'(xi[i1]) * PW'(WMSIN[kk]);
    pi = PW'(xr[i1]) * PW'(WMSIN[kk]) + PW'(xi[i1]) * PW'(WCOS[kk]);
    tr = IW'((pr + PW'(1 << (TW - 3))) >>> (TW - 2));
    ti = IW'((pi + PW'(1 << (TW - 3))) >>> (TW - 2));
  end

  assign in_ready  = (state == S_LOAD);
  assign out_valid = (state == S_OUT);
  assign busy      = (state == S_CALC);
  assign out_last  = out_valid && (cnt == LOGN'(N - 1));

  // ---------------- output ----------------
  logic [IW-1:0] ar, ai, amax, amin;
  always_comb begin
    out_re  = xr[cnt];
    out_im  = xi[cnt];
    ar      = out_re[IW-1] ? IW'(-out_re) : IW'(out_re);
    ai      = out_im[IW-1] ? IW'(-out_im) : IW'(out_im);
    amax    = (ar > ai) ? ar : ai;
    amin    = (ar > ai) ? ai : ar;
    out_mag = amax + (amin >> 1);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= S_LOAD;
      cnt   <= '0;
      stg   <= '0;
    end else begin
      unique case (state)
        S_LOAD: if (in_valid) begin
          cnt <= cnt + 1'b1;
          if (cnt == LOGN'(N - 1)) begin
            state <= S_CALC;
            cnt   <= '0;
            stg   <= '0;
          end
        end
        S_CALC: begin
          if (cnt[LOGN-2:0] == '1) begin
            cnt <= '0;
            if (stg == ($bits(stg))'(LOGN - 1)) state <= S_OUT;
            else                                stg   <= stg + 1'b1;
          end else begin
            cnt <= cnt + 1'b1;
          end
        end
        S_OUT: if (out_ready) begin
          cnt <= cnt + 1'b1;
          if (cnt == LOGN'(N - 1)) begin
            state <= S_LOAD;
            cnt   <= '0;
          end
        end
        default: state <= S_LOAD;
      endcase
    end
  end

  // sample memory: bit-reversed load, in-place butterflies
  always_ff @(posedge clk) begin
    if (state == S_LOAD && in_valid) begin
      xr[bitrev(cnt)] <= IW'(in_data);
      xi[bitrev(cnt)] <= '0;
    end else if (state == S_CALC) begin
      xr[i0] <= xr[i0] + tr;
      xi[i0] <= xi[i0] + ti;
      xr[i1] <= xr[i0] - tr;
      xi[i1] <= xi[i0] - ti;
    end
  end

  if (N < 4 || (1 << LOGN) != N) begin : g_bad_n
    $error("stann_fft: N must be a power of two >= 4");
  end

endmodule
