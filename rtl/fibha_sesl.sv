// fibha_sesl: the SESL part of FiBHA, a pipeline of dedicated per-layer engines that runs
// the first, most heterogeneous layers of the CNN.
//
// The default configuration holds the first three layers of MobileNetV2 (the co-design
// target of FiBHA): engine 0 a standard 3x3 stride-2 convolution 3->32 channels (the only
// standard convolution of the model), engine 1 a depthwise 3x3 convolution on 32 channels,
// engine 2 a pointwise convolution 32->16. The input image is processed tile by tile:
// the host writes a tile (with its halo) into the input double buffer and commits it;
// double buffers sit between consecutive engines, so while engine 0 processes tile n+2,
// engine 1 processes tile n+1 and engine 2 tile n. Engine 2 writes into the bridge
// double buffer (outside this module) that feeds the SEML part.
// PEs per engine are chosen so that the engines' tile times are close (2349,
// 2009 and 1666 busy cycles at the defaults), following the rule that SESL engines should
// have equal execution times. All weights of this part are on chip, loaded by the host
// through wl_*/bl_* with wl_stage selecting the engine; the load data is as wide as the
// widest engine and each engine takes its low PAR lanes.
// Tile sizes, the layer-to-engine mapping and the PE split are choices of this design.
module fibha_sesl
  import fibha_pkg::*;
#(
  parameter int unsigned TILE_H = 19,   // input tile height incl. halo
  parameter int unsigned TILE_W = 19,   // input tile width incl. halo
  parameter int unsigned C0     = 3,    // image channels
  parameter int unsigned C1     = 32,   // engine 0 output channels
  parameter int unsigned C3     = 16,   // engine 2 output channels
  parameter int unsigned PAR0   = 32,
  parameter int unsigned PAR1   = 8,
  parameter int unsigned PAR2   = 16,
  localparam int unsigned H1 = (TILE_H - 3) / 2 + 1,   // after engine 0 (3x3, stride 2)
  localparam int unsigned W1 = (TILE_W - 3) / 2 + 1,
  localparam int unsigned H2 = H1 - 2,                  // after engine 1 (3x3, stride 1)
  localparam int unsigned W2 = W1 - 2,
  localparam int unsigned PARW = (PAR0 > PAR1) ? ((PAR0 > PAR2) ? PAR0 : PAR2)
                                               : ((PAR1 > PAR2) ? PAR1 : PAR2),
  localparam int unsigned IN_AW  = $clog2(TILE_H*TILE_W),
  localparam int unsigned OUT_AW = $clog2(H2*W2)
) (
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic [2:0][4:0]       shift,      // requantisation shift of engines 0..2
  // host: input tile double buffer
  output logic                  in_ready,
  input  logic                  in_we,
  input  logic [IN_AW-1:0]      in_waddr,
  input  act_t [C0-1:0]         in_wdata,
  input  logic                  in_commit,
  // host: weight loading
  input  logic [1:0]            wl_stage,
  input  logic                  wl_we,
  input  logic [15:0]           wl_addr,
  input  wgt_t [PARW-1:0]       wl_data,
  input  logic                  bl_we,
  input  logic [7:0]            bl_addr,
  input  acc_t [PARW-1:0]       bl_data,
  // bridge double buffer, producer side
  input  logic                  out_ready,
  output logic                  out_we,
  output logic [OUT_AW-1:0]     out_waddr,
  output act_t [C3-1:0]         out_wdata,
  output logic                  out_commit,
  // status
  output logic [2:0]            stage_busy,
  output logic [2:0]            stage_stalled
);

  localparam int unsigned A1_AW = $clog2(H1*W1);

  // input buffer -> engine 0
  logic               b0_valid, b0_release;
  logic [IN_AW-1:0]   b0_raddr;
  act_t [C0-1:0]      b0_rdata;
  // engine 0 -> buffer 1 -> engine 1
  logic               b1_ready, b1_we, b1_commit, b1_valid, b1_release;
  logic [A1_AW-1:0]   b1_waddr, b1_raddr;
  act_t [C1-1:0]      b1_wdata, b1_rdata;
  // engine 1 -> buffer 2 -> engine 2
  logic               b2_ready, b2_we, b2_commit, b2_valid, b2_release;
  logic [OUT_AW-1:0]  b2_waddr, b2_raddr;
  act_t [C1-1:0]      b2_wdata, b2_rdata;

  fibha_pingpong_buf #(.WIDTH(C0*ACT_W), .DEPTH(TILE_H*TILE_W)) u_buf0 (
    .clk, .rst_n,
    .wr_ready(in_ready), .we(in_we), .waddr(in_waddr), .wdata(in_wdata), .wr_commit(in_commit),
    .rd_valid(b0_valid), .raddr(b0_raddr), .rdata(b0_rdata), .rd_release(b0_release)
  );

  fibha_sesl_stage #(
    .LTYPE(LT_STD), .K(3), .STRIDE(2), .H_IN(TILE_H), .W_IN(TILE_W),
    .C_IN(C0), .C_OUT(C1), .PAR(PAR0)
  ) u_e0 (
    .clk, .rst_n, .shift(shift[0]),
    .wl_we(wl_we && wl_stage == 2'd0), .wl_addr, .wl_data(wl_data[PAR0-1:0]),
    .bl_we(bl_we && wl_stage == 2'd0), .bl_addr, .bl_data(bl_data[PAR0-1:0]),
    .in_valid(b0_valid), .in_raddr(b0_raddr), .in_rdata(b0_rdata), .in_release(b0_release),
    .out_ready(b1_ready), .out_we(b1_we), .out_waddr(b1_waddr), .out_wdata(b1_wdata),
    .out_commit(b1_commit), .busy(stage_busy[0]), .stalled(stage_stalled[0])
  );

  fibha_pingpong_buf #(.WIDTH(C1*ACT_W), .DEPTH(H1*W1)) u_buf1 (
    .clk, .rst_n,
    .wr_ready(b1_ready), .we(b1_we), .waddr(b1_waddr), .wdata(b1_wdata), .wr_commit(b1_commit),
    .rd_valid(b1_valid), .raddr(b1_raddr), .rdata(b1_rdata), .rd_release(b1_release)
  );

  fibha_sesl_stage #(
    .LTYPE(LT_DW), .K(3), .STRIDE(1), .H_IN(H1), .W_IN(W1),
    .C_IN(C1), .C_OUT(C1), .PAR(PAR1)
  ) u_e1 (
    .clk, .rst_n, .shift(shift[1]),
    .wl_we(wl_we && wl_stage == 2'd1), .wl_addr, .wl_data(wl_data[PAR1-1:0]),
    .bl_we(bl_we && wl_stage == 2'd1), .bl_addr, .bl_data(bl_data[PAR1-1:0]),
    .in_valid(b1_valid), .in_raddr(b1_raddr), .in_rdata(b1_rdata), .in_release(b1_release),
    .out_ready(b2_ready), .out_we(b2_we), .out_waddr(b2_waddr), .out_wdata(b2_wdata),
    .out_commit(b2_commit), .busy(stage_busy[1]), .stalled(stage_stalled[1])
  );

  fibha_pingpong_buf #(.WIDTH(C1*ACT_W), .DEPTH(H2*W2)) u_buf2 (
    .clk, .rst_n,
    .wr_ready(b2_ready), .we(b2_we), .waddr(b2_waddr), .wdata(b2_wdata), .wr_commit(b2_commit),
    .rd_valid(b2_valid), .raddr(b2_raddr), .rdata(b2_rdata), .rd_release(b2_release)
  );

  fibha_sesl_stage #(
    .LTYPE(LT_PW), .K(1), .STRIDE(1), .H_IN(H2), .W_IN(W2),
    .C_IN(C1), .C_OUT(C3), .PAR(PAR2)
  ) u_e2 (
    .clk, .rst_n, .shift(shift[2]),
    .wl_we(wl_we && wl_stage == 2'd2), .wl_addr, .wl_data(wl_data[PAR2-1:0]),
    .bl_we(bl_we && wl_stage == 2'd2), .bl_addr, .bl_data(bl_data[PAR2-1:0]),
    .in_valid(b2_valid), .in_raddr(b2_raddr), .in_rdata(b2_rdata), .in_release(b2_release),
    .out_ready(out_ready), .out_we(out_we), .out_waddr(out_waddr), .out_wdata(out_wdata),
    .out_commit(out_commit), .busy(stage_busy[2]), .stalled(stage_stalled[2])
  );

endmodule
