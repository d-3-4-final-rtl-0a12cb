// stann_fc_layer: one fully connected layer of the STANN-style dataflow classifier,
// y = act(W x + b), with a linear systolic array of PE multiply-accumulate cells.
//
// The weight matrix is processed in blocks of PE output neurons (block matrix
// multiplication; PE is the configurable number of processing elements of the layer).
// For each block the stored input vector is fed into PE 0 one element per cycle and
// shifted from PE to PE, so PE j sees element i one cycle after PE j-1 and multiplies it
// with W[block*PE + j][i] from its own weight bank. After N_IN + PE cycles the block
// is complete and its PE results are streamed out, with the bias added, rescaled and,
// if RELU is set, clipped at zero.
// Numbers are signed fixed point with FRAC fraction bits in DW-bit words (products are
// accumulated at full precision and saturated back to DW bits).
// Interface: the input vector arrives as N_IN beats on in_valid/in_ready, the output as
// N_OUT beats on out_valid/out_ready; both are streams in the sense of HLS streams, so
// layers chain directly. Weights (index o*N_IN+i) and biases are written through the
// w_*/b_* ports before use. Per input vector the layer takes
//   N_IN + NBLK*(N_IN + 2*PE) cycles without back-pressure, NBLK = ceil(N_OUT/PE).
// The published design uses floating-point and half-precision data; fixed point, the linear
// (one-vector) form of the systolic array and the stream protocol are this design's.
module stann_fc_layer #(
  parameter int unsigned N_IN  = 320,
  parameter int unsigned N_OUT = 64,
  parameter int unsigned PE    = 4,
  parameter int unsigned DW    = 16,
  parameter int unsigned FRAC  = 8,
  parameter bit          RELU  = 1'b1,
  localparam int unsigned NBLK = (N_OUT + PE - 1) / PE,
  localparam int unsigned WAW  = $clog2(N_IN*N_OUT),
  localparam int unsigned IAW  = $clog2(N_IN + 1),
  localparam int unsigned OAW  = $clog2(N_OUT + 1),
  localparam int unsigned ACCW = 2*DW + $clog2(N_IN) + 1
) (
  input  logic                 clk,
  input  logic                 rst_n,
  // parameter loading
  input  logic                 w_we,
  input  logic [WAW-1:0]       w_addr,
  input  logic signed [DW-1:0] w_data,
  input  logic                 b_we,
  input  logic [OAW-1:0]       b_addr,
  input  logic signed [DW-1:0] b_data,
  // input stream
  input  logic                 in_valid,
  output logic                 in_ready,
  input  logic signed [DW-1:0] in_data,
  // output stream
  output logic                 out_valid,
  input  logic                 out_ready,
  output logic signed [DW-1:0] out_data
);

  typedef logic signed [DW-1:0]   data_t;
  typedef logic signed [ACCW-1:0] acc_t;

  // Weight bank j holds the rows o with o % PE == j, row-major.
  localparam int unsigned BANKD = NBLK * N_IN;
  data_t wbank [PE][BANKD];
  data_t bias  [N_OUT];
  data_t xbuf  [N_IN];

  always_ff @(posedge clk) begin
    if (w_we && 32'(w_addr) < N_IN*N_OUT)
      wbank[(32'(w_addr) / N_IN) % PE][((32'(w_addr) / N_IN) / PE) * N_IN + 32'(w_addr) % N_IN] <= w_data;
    if (b_we && 32'(b_addr) < N_OUT) bias[b_addr] <= b_data;
  end

  typedef enum logic [1:0] {S_LOAD, S_MAC, S_OUT} state_e;
  state_e state;
  logic [IAW-1:0] icnt;            // input elements loaded / fed
  logic [$clog2(NBLK+1)-1:0] blk;
  logic [$clog2(N_IN+PE+1)-1:0] t; // cycle within a block
  logic [$clog2(PE+1)-1:0] ocnt;   // PE result being sent

  // Systolic pipeline: element value, its index and a valid flag per PE.
  data_t          xs [PE];
  logic [IAW-1:0] xi [PE];
  logic [PE-1:0]  xv;
  acc_t           acc [PE];

  assign in_ready = (state == S_LOAD);

  // Output value of the current PE result.
  logic [31:0] o_idx;
  acc_t  o_sum;
  data_t o_val;
  assign o_idx = 32'(blk) * PE + 32'(ocnt);
  always_comb begin
    acc_t hi, lo;
    hi = acc_t'({1'b0, {(DW-1){1'b1}}});
    lo = -hi - 1;
    o_sum = (acc[ocnt[$clog2(PE > 1 ? PE : 2)-1:0]] + (acc_t'(bias[o_idx < N_OUT ? OAW'(o_idx) : '0]) <<< FRAC)) >>> FRAC;
    if (RELU && o_sum < 0) o_sum = '0;
    if (o_sum > hi) o_val = data_t'(hi);
    else if (o_sum < lo) o_val = data_t'(lo);
    else o_val = data_t'(o_sum);
  end
  assign out_valid = (state == S_OUT) && (o_idx < N_OUT);
  assign out_data  = o_val;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= S_LOAD;
      icnt <= '0; blk <= '0; t <= '0; ocnt <= '0;
      xv <= '0;
      for (int j = 0; j < PE; j++) begin
        xs[j] <= '0; xi[j] <= '0; acc[j] <= '0;
      end
    end else begin
      unique case (state)
        S_LOAD: if (in_valid) begin
          xbuf[icnt] <= in_data;
          if (32'(icnt) == N_IN - 1) begin
            icnt <= '0; blk <= '0; t <= '0;
            state <= S_MAC;
          end else icnt <= icnt + 1'b1;
        end
        S_MAC: begin
          // shift the input element through the PE chain
          xs[0] <= (32'(t) < N_IN) ? xbuf[t[IAW-1:0]] : '0;
          xi[0] <= IAW'(t);
          xv[0] <= (32'(t) < N_IN);
          for (int j = 1; j < PE; j++) begin
            xs[j] <= xs[j-1];
            xi[j] <= xi[j-1];
            xv[j] <= xv[j-1];
          end
          for (int j = 0; j < PE; j++)
            if (xv[j]) acc[j] <= acc[j] + acc_t'(xs[j]) * acc_t'(wbank[j][32'(blk) * N_IN + 32'(xi[j])]);
          if (32'(t) == N_IN + PE - 1) begin
            ocnt <= '0;
            state <= S_OUT;
          end
          t <= t + 1'b1;
        end
        S_OUT: if (out_ready || !out_valid) begin
          if (32'(ocnt) == PE - 1) begin
            for (int j = 0; j < PE; j++) acc[j] <= '0;
            xv <= '0;
            t <= '0;
            if (32'(blk) == NBLK - 1) begin
              blk <= '0;
              state <= S_LOAD;
            end else begin
              blk <= blk + 1'b1;
              state <= S_MAC;
            end
          end else ocnt <= ocnt + 1'b1;
        end
        default: state <= S_LOAD;
      endcase
    end
  end

  a_out_hold: assert property (@(posedge clk) disable iff (!rst_n)
      (out_valid && !out_ready) |=> (out_valid && $stable(out_data)))
    else $error("stann_fc_layer: output changed while stalled");

endmodule
