// stann_fft_frontend: frequency-domain feature extraction of the arc-detection classifier.
//
// A frame of N_RAW = N_A + N_B samples (160 = 128 + 32) arrives on in_valid/in_ready/
// in_data. The first N_A samples go to an N_A-point FFT, the last N_B samples to an
// N_B-point FFT (both stann_fft), so the short FFT loads while the long one computes.
// The two spectra leave as one stream of N_A + N_B magnitudes on spec_valid/spec_ready/
// spec_data: the N_A bins of the first FFT, then the N_B bins of the second, with
// spec_last on the final bin of the frame. Magnitudes are the FFTs' estimate
// max(|re|,|im|) + min(|re|,|im|)/2, unsigned, as wide as the larger FFT's datapath.
// Normalisation and concatenation with the raw samples, which produce the classifier's
// 320 input features, are done outside this block (the raw samples are the host's own
// input); only the magnitudes leave the block. Timing: after the last sample,
// N_A*log2(N_A)/2 compute cycles, then N_A + N_B output beats without back-pressure; a new frame can be loaded into the first FFT as
// soon as it has emitted its spectrum.
// Splitting the frame into 128 and 32 samples and transforming each follows the published
// classifier; the stream interface and the spectrum order are this design's choices.
module stann_fft_frontend #(
  parameter int unsigned N_A = 128,
  parameter int unsigned N_B = 32,
  parameter int unsigned DW  = 16,
  localparam int unsigned IWA = DW + $clog2(N_A) + 1,
  localparam int unsigned IWB = DW + $clog2(N_B) + 1,
  localparam int unsigned CW  = $clog2(N_A + N_B)
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 in_valid,
  output logic                 in_ready,
  input  logic signed [DW-1:0] in_data,
  output logic                 spec_valid,
  input  logic                 spec_ready,
  output logic [IWA-1:0]       spec_data,
  output logic                 spec_last
);

  logic [CW-1:0] in_cnt;         // sample index within the frame
  logic          to_b;           // current sample belongs to the short FFT
  logic          out_b;          // spectrum output currently from the short FFT

  logic a_iv, a_ir, a_ov, a_or, a_last;
  logic b_iv, b_ir, b_ov, b_or, b_last;
  logic [IWA-1:0] a_mag;
  logic [IWB-1:0] b_mag;

  assign to_b     = (in_cnt >= CW'(N_A));
  assign a_iv     = in_valid && !to_b;
  assign b_iv     = in_valid &&  to_b;
  assign in_ready = to_b ? b_ir : a_ir;

  stann_fft #(.N(N_A), .DW(DW)) u_fft_a (
    .clk, .rst_n, .in_valid(a_iv), .in_ready(a_ir), .in_data,
    .out_valid(a_ov), .out_ready(a_or), .out_re(), .out_im(), .out_mag(a_mag),
    .out_last(a_last), .busy());

  stann_fft #(.N(N_B), .DW(DW)) u_fft_b (
    .clk, .rst_n, .in_valid(b_iv), .in_ready(b_ir), .in_data,
    .out_valid(b_ov), .out_ready(b_or), .out_re(), .out_im(), .out_mag(b_mag),
    .out_last(b_last), .busy());

  assign spec_valid = out_b ? b_ov : a_ov;
  assign spec_data  = out_b ? IWA'(b_mag) : a_mag;
  assign spec_last  = out_b && b_last;
  assign a_or       = !out_b && spec_ready;
  assign b_or       =  out_b && spec_ready;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      in_cnt <= '0;
      out_b  <= 1'b0;
    end else begin
      if (in_valid && in_ready)
        in_cnt <= (in_cnt == CW'(N_A + N_B - 1)) ? '0 : in_cnt + 1'b1;
      if (spec_valid && spec_ready) begin
        if (!out_b && a_last) out_b <= 1'b1;
        if ( out_b && b_last) out_b <= 1'b0;
      end
    end
  end

endmodule
