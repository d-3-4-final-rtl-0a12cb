// stann_mlp: the arc-detection classifier of the STANN case study, four fully connected
// layers (three hidden layers with ReLU, one linear output layer) chained by streams into
// a dataflow pipeline.
//
// Each layer stores its whole input vector before computing, so while layer k works on
// feature vector n, layer k-1 can already accept vector n+1: the layers form pipeline
// stages as in an HLS dataflow region. The 320 input features are the normalised
// concatenation of the 160 raw samples and the spectra of the first 128 and the last 32
// samples, produced by a front end outside this module. The number of PEs per layer is
// the block size of each layer's systolic array (PE). Weights and biases of layer
// w_layer are loaded through the w_*/b_* ports. Latency of one vector without
// back-pressure is the sum over layers of N_IN + NBLK*(N_IN + 2*PE) cycles.
// Hidden-layer widths, the two output classes and the fixed-point number format are this
// design's choices.
module stann_mlp #(
  parameter int unsigned N0   = 320,  // input features
  parameter int unsigned N1   = 64,
  parameter int unsigned N2   = 32,
  parameter int unsigned N3   = 16,
  parameter int unsigned N4   = 2,    // output classes
  parameter int unsigned PE   = 4,
  parameter int unsigned DW   = 16,
  parameter int unsigned FRAC = 8
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic [1:0]           w_layer,
  input  logic                 w_we,
  input  logic [15:0]          w_addr,
  input  logic signed [DW-1:0] w_data,
  input  logic                 b_we,
  input  logic [7:0]           b_addr,
  input  logic signed [DW-1:0] b_data,
  input  logic                 in_valid,
  output logic                 in_ready,
  input  logic signed [DW-1:0] in_data,
  output logic                 out_valid,
  input  logic                 out_ready,
  output logic signed [DW-1:0] out_data
);

  localparam int unsigned WA0 = $clog2(N0*N1), WA1 = $clog2(N1*N2), WA2 = $clog2(N2*N3), WA3 = $clog2(N3*N4);
  localparam int unsigned BA0 = $clog2(N1+1), BA1 = $clog2(N2+1), BA2 = $clog2(N3+1), BA3 = $clog2(N4+1);

  logic                 v1, r1, v2, r2, v3, r3;
  logic signed [DW-1:0] d1, d2, d3;

  stann_fc_layer #(.N_IN(N0), .N_OUT(N1), .PE(PE), .DW(DW), .FRAC(FRAC), .RELU(1'b1)) u_l0 (
    .clk, .rst_n,
    .w_we(w_we && w_layer == 2'd0), .w_addr(WA0'(w_addr)), .w_data,
    .b_we(b_we && w_layer == 2'd0), .b_addr(BA0'(b_addr)), .b_data,
    .in_valid, .in_ready, .in_data, .out_valid(v1), .out_ready(r1), .out_data(d1)
  );
  stann_fc_layer #(.N_IN(N1), .N_OUT(N2), .PE(PE), .DW(DW), .FRAC(FRAC), .RELU(1'b1)) u_l1 (
    .clk, .rst_n,
    .w_we(w_we && w_layer == 2'd1), .w_addr(WA1'(w_addr)), .w_data,
    .b_we(b_we && w_layer == 2'd1), .b_addr(BA1'(b_addr)), .b_data,
    .in_valid(v1), .in_ready(r1), .in_data(d1), .out_valid(v2), .out_ready(r2), .out_data(d2)
  );
  stann_fc_layer #(.N_IN(N2), .N_OUT(N3), .PE(PE), .DW(DW), .FRAC(FRAC), .RELU(1'b1)) u_l2 (
    .clk, .rst_n,
    .w_we(w_we && w_layer == 2'd2), .w_addr(WA2'(w_addr)), .w_data,
    .b_we(b_we && w_layer == 2'd2), .b_addr(BA2'(b_addr)), .b_data,
    .in_valid(v2), .in_ready(r2), .in_data(d2), .out_valid(v3), .out_ready(r3), .out_data(d3)
  );
  stann_fc_layer #(.N_IN(N3), .N_OUT(N4), .PE(PE), .DW(DW), .FRAC(FRAC), .RELU(1'b0)) u_l3 (
    .clk, .rst_n,
    .w_we(w_we && w_layer == 2'd3), .w_addr(WA3'(w_addr)), .w_data,
    .b_we(b_we && w_layer == 2'd3), .b_addr(BA3'(b_addr)), .b_data,
    .in_valid(v3), .in_ready(r3), .in_data(d3), .out_valid, .out_ready, .out_data
  );

endmodule
