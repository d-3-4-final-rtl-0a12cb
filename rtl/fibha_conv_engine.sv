// fibha_conv_engine: fused convolution + batch-norm + ReLU engine used for every FiBHA
// layer, both as a dedicated SESL engine (configuration tied to one layer) and as the
// reusable SEML engine (configuration changed per layer at run time).
//
// It computes one "valid" convolution of an input tile held in a pixel-addressed buffer
// (one read returns all channels of one pixel) and writes one output pixel vector per
// output position. PAR lanes work in parallel, each a multiply-accumulate unit (PE):
//   * LT_STD / LT_PW: the lanes hold PAR output channels of one group; every cycle one
//     input activation (pixel at ky,kx, channel ic) is broadcast to all lanes and each
//     lane multiplies it by its own weight. PW is STD with k = 1.
//   * LT_DW: the lanes hold PAR channels; lane p multiplies channel g*PAR+p of the pixel
//     with its own filter tap.
// Loop order, innermost first: ic, kx, ky (MAC cycles), then one FIN cycle that adds the
// bias, shifts, clips and stores the group into the output pixel register, then the next
// channel group, then one WR cycle that writes the pixel. Hence the tile takes
//   OH*OW*(G*(K*K*NIC + 1) + 1) busy cycles,
// with G = ceil(C/PAR) channel groups and NIC = c_in for STD/PW, 1 for DW.
// Weight word layout (PAR INT8 weights per word): STD/PW ((g*K+ky)*K+kx)*c_in+ic,
// DW (g*K+ky)*K+kx; lane p of the word belongs to channel g*PAR+p. Bias word g holds the
// PAR 32-bit biases of group g. Buffers are read combinationally.
// Interface: pulse start with cfg valid; busy is high until the cycle after done; done
// pulses in the cycle of the last pixel write.
// The fused conv/BN/ReLU layer, the three convolution types and PE-parallel engines
// follow the accelerator description; the lane organisation, loop order, valid-padding
// tiles and shift requantisation are choices of this design.
module fibha_conv_engine
  import fibha_pkg::*;
#(
  parameter int unsigned H_MAX  = 19,   // largest input tile height
  parameter int unsigned W_MAX  = 19,   // largest input tile width
  parameter int unsigned CI_MAX = 3,    // input pixel vector channels
  parameter int unsigned CO_MAX = 32,   // output pixel vector channels
  parameter int unsigned PAR    = 32,   // MAC lanes (PEs)
  parameter int unsigned WDEPTH = 27,   // weight buffer words
  parameter int unsigned BDEPTH = 1,    // bias buffer words
  localparam int unsigned PIXAW = $clog2(H_MAX*W_MAX),
  localparam int unsigned WAW   = (WDEPTH > 1) ? $clog2(WDEPTH) : 1,
  localparam int unsigned BAW   = (BDEPTH > 1) ? $clog2(BDEPTH) : 1
) (
  input  logic                   clk,
  input  logic                   rst_n,
  input  logic                   start,
  input  layer_cfg_t             cfg,
  output logic                   busy,
  output logic                   done,
  // input tile buffer
  output logic [PIXAW-1:0]       in_raddr,
  input  act_t [CI_MAX-1:0]      in_rdata,
  // weight and bias buffers
  output logic [WAW-1:0]         w_raddr,
  input  wgt_t [PAR-1:0]         w_rdata,
  output logic [BAW-1:0]         b_raddr,
  input  acc_t [PAR-1:0]         b_rdata,
  // output tile buffer
  output logic                   out_we,
  output logic [PIXAW-1:0]       out_waddr,
  output act_t [CO_MAX-1:0]      out_wdata
);

  typedef enum logic [1:0] {S_IDLE, S_MAC, S_FIN, S_WR} state_e;
  state_e state;

  layer_cfg_t c;
  logic [7:0] oh, ow, oy, ox;
  logic [9:0] ngroups, nic, og, ic;
  logic [1:0] ky, kx;
  acc_t [PAR-1:0]    acc;
  act_t [CO_MAX-1:0] opix;

  logic last_ic, last_kx, last_ky, last_g, last_x, last_y;
  assign last_ic = (ic == nic - 10'd1);
  assign last_kx = (kx == c.k - 2'd1);
  assign last_ky = (ky == c.k - 2'd1);
  assign last_g  = (og == ngroups - 10'd1);
  assign last_x  = (ox == ow - 8'd1);
  assign last_y  = (oy == oh - 8'd1);

  assign busy = (state != S_IDLE);
  assign done = (state == S_WR) && last_x && last_y;

  // Buffer addresses.
  logic [15:0] iy, ix;
  assign iy = 16'(oy) * 16'(c.stride) + 16'(ky);
  assign ix = 16'(ox) * 16'(c.stride) + 16'(kx);
  assign in_raddr = PIXAW'(iy * 16'(c.w_in) + ix);

  logic [19:0] tap;
  assign tap = (20'(og) * 20'(c.k) + 20'(ky)) * 20'(c.k) + 20'(kx);
  assign w_raddr = (c.ltype == LT_DW) ? WAW'(tap) : WAW'(tap * 20'(c.c_in) + 20'(ic));
  assign b_raddr = BAW'(og);

  assign out_we    = (state == S_WR);
  assign out_waddr = PIXAW'(16'(oy) * 16'(ow) + 16'(ox));
  assign out_wdata = opix;

  // Lane operands.
  act_t [PAR-1:0] a_lane;
  always_comb begin
    for (int p = 0; p < PAR; p++) begin
      int unsigned ch;
      ch = 32'(og) * PAR + 32'(p);
      if (c.ltype == LT_DW) a_lane[p] = (ch < CI_MAX) ? in_rdata[ch] : '0;
      else                  a_lane[p] = (32'(ic) < CI_MAX) ? in_rdata[ic] : '0;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= S_IDLE;
      c <= '0;
      oh <= '0; ow <= '0; oy <= '0; ox <= '0;
      ngroups <= '0; nic <= '0; og <= '0; ic <= '0;
      ky <= '0; kx <= '0;
      acc <= '0;
      opix <= '0;
    end else begin
      unique case (state)
        S_IDLE: if (start) begin
          c  <= cfg;
          oh <= out_dim(cfg.h_in, cfg.k, cfg.stride);
          ow <= out_dim(cfg.w_in, cfg.k, cfg.stride);
          ngroups <= 10'(((cfg.ltype == LT_DW ? 32'(cfg.c_in) : 32'(cfg.c_out)) + PAR - 1) / PAR);
          nic <= (cfg.ltype == LT_DW) ? 10'd1 : cfg.c_in;
          oy <= '0; ox <= '0; og <= '0; ic <= '0; ky <= '0; kx <= '0;
          acc <= '0;
          opix <= '0;
          state <= S_MAC;
        end
        S_MAC: begin
          for (int p = 0; p < PAR; p++) acc[p] <= acc[p] + acc_t'(a_lane[p]) * acc_t'(w_rdata[p]);
          if (!last_ic) ic <= ic + 10'd1;
          else begin
            ic <= '0;
            if (!last_kx) kx <= kx + 2'd1;
            else begin
              kx <= '0;
              if (!last_ky) ky <= ky + 2'd1;
              else begin
                ky <= '0;
                state <= S_FIN;
              end
            end
          end
        end
        S_FIN: begin
          for (int p = 0; p < PAR; p++) begin
            int unsigned ch;
            ch = 32'(og) * PAR + 32'(p);
            if (ch < CO_MAX) opix[ch] <= requant(acc[p], b_rdata[p], c.shift);
          end
          acc <= '0;
          if (!last_g) begin
            og <= og + 10'd1;
            state <= S_MAC;
          end else begin
            og <= '0;
            state <= S_WR;
          end
        end
        S_WR: begin
          opix <= '0;
          if (!last_x) begin
            ox <= ox + 8'd1;
            state <= S_MAC;
          end else begin
            ox <= '0;
            if (!last_y) begin
              oy <= oy + 8'd1;
              state <= S_MAC;
            end else begin
              oy <= '0;
              state <= S_IDLE;
            end
          end
        end
        default: state <= S_IDLE;
      endcase
    end
  end

  a_cfg_kernel: assert property (@(posedge clk) disable iff (!rst_n)
      (start && state == S_IDLE) |-> (cfg.k >= 2'd1 && cfg.stride >= 2'd1 && cfg.h_in >= 8'(cfg.k) && cfg.w_in >= 8'(cfg.k)))
    else $error("conv_engine: bad layer shape");

endmodule
