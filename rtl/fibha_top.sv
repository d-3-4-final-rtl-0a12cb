// fibha_top: FiBHA, a fixed-budget hybrid CNN accelerator.
//
// The first layers of a CNN differ strongly from one another (high and fast-changing
// weight reuse, shallow inputs, the only standard convolution) and have small weights
// but large feature maps; the later layers are alike, have large weights and small
// feature maps. FiBHA therefore runs the first layers on an SESL pipeline (one dedicated
// engine per layer, weights on chip, tiles flowing through double buffers) and the rest
// on an SEML part (one reusable engine, layers one at a time, weights fetched from
// off-chip memory). A double buffer bridges the two parts so both work concurrently:
// while the SEML part is still on tile n, the SESL part already produces tile n+1.
//
// Host interface:
//   * in_*      : write an input tile (pixel vectors of C0 INT8 channels, row-major, with
//                 halo) into the SESL input double buffer, then pulse in_commit.
//   * wl_*/bl_* : load the on-chip weights and biases of SESL engine wl_stage;
//                 sesl_shift holds the three engines' requantisation shifts.
//   * num_layers/layers : the SEML layer table.
//   * mem_*     : off-chip memory read port used by the SEML part for its weights.
//   * out_*     : result tile, one pixel vector per beat, consumed by the host processor
//                 (which runs the final fully connected layer).
// Status outputs expose engine activity and stalls for monitoring.
// The SESL/SEML split, the double-buffer bridge, on-chip SESL and off-chip SEML weights
// and the host-side fully connected layer follow the published architecture; the number
// of SESL engines (three), tile size, PE counts and all port protocols are this design's.
module fibha_top
  import fibha_pkg::*;
#(
  parameter int unsigned TILE_H   = 19,
  parameter int unsigned TILE_W   = 19,
  parameter int unsigned C0       = 3,
  parameter int unsigned C1       = 32,
  parameter int unsigned C3       = 16,
  parameter int unsigned PAR0     = 32,
  parameter int unsigned PAR1     = 8,
  parameter int unsigned PAR2     = 16,
  parameter int unsigned SEML_PAR = 16,
  parameter int unsigned C_MAX    = 96,
  parameter int unsigned NL_MAX   = 8,
  parameter int unsigned WDEPTH   = 1024,
  parameter int unsigned BDEPTH   = 8,
  parameter int unsigned EXT_AW   = 24,
  localparam int unsigned H2 = (TILE_H - 3) / 2 + 1 - 2,
  localparam int unsigned W2 = (TILE_W - 3) / 2 + 1 - 2,
  localparam int unsigned PARW = (PAR0 > PAR1) ? ((PAR0 > PAR2) ? PAR0 : PAR2)
                                               : ((PAR1 > PAR2) ? PAR1 : PAR2),
  localparam int unsigned IN_AW  = $clog2(TILE_H*TILE_W),
  localparam int unsigned BR_AW  = $clog2(H2*W2),
  localparam int unsigned LAW    = $clog2(NL_MAX + 1)
) (
  input  logic                  clk,
  input  logic                  rst_n,
  // input tiles
  output logic                  in_ready,
  input  logic                  in_we,
  input  logic [IN_AW-1:0]      in_waddr,
  input  act_t [C0-1:0]         in_wdata,
  input  logic                  in_commit,
  // SESL weight loading and requantisation shifts
  input  logic [2:0][4:0]       sesl_shift,
  input  logic [1:0]            wl_stage,
  input  logic                  wl_we,
  input  logic [15:0]           wl_addr,
  input  wgt_t [PARW-1:0]       wl_data,
  input  logic                  bl_we,
  input  logic [7:0]            bl_addr,
  input  acc_t [PARW-1:0]       bl_data,
  // SEML layer table
  input  logic [LAW-1:0]        num_layers,
  input  seml_layer_t           layers [NL_MAX],
  // off-chip memory
  output logic                  mem_req,
  output logic [EXT_AW-1:0]     mem_addr,
  input  logic                  mem_gnt,
  input  logic                  mem_rvalid,
  input  wgt_t [SEML_PAR-1:0]   mem_rdata,
  // results
  output logic                  out_valid,
  input  logic                  out_ready,
  output act_t [C_MAX-1:0]      out_data,
  output logic                  out_last,
  // status
  output logic [2:0]            sesl_busy,
  output logic [2:0]            sesl_stalled,
  output logic                  bridge_full,   // SESL output waits for the SEML part
  output logic                  seml_busy,
  output logic                  seml_fetching,
  output logic [LAW-1:0]        seml_layer
);

  logic               br_ready, br_we, br_commit, br_valid, br_release;
  logic [BR_AW-1:0]   br_waddr, br_raddr;
  act_t [C3-1:0]      br_wdata, br_rdata;

  fibha_sesl #(
    .TILE_H(TILE_H), .TILE_W(TILE_W), .C0(C0), .C1(C1), .C3(C3),
    .PAR0(PAR0), .PAR1(PAR1), .PAR2(PAR2)
  ) u_sesl (
    .clk, .rst_n, .shift(sesl_shift),
    .in_ready, .in_we, .in_waddr, .in_wdata, .in_commit,
    .wl_stage, .wl_we, .wl_addr, .wl_data, .bl_we, .bl_addr, .bl_data,
    .out_ready(br_ready), .out_we(br_we), .out_waddr(br_waddr), .out_wdata(br_wdata),
    .out_commit(br_commit),
    .stage_busy(sesl_busy), .stage_stalled(sesl_stalled)
  );

  fibha_pingpong_buf #(.WIDTH(C3*ACT_W), .DEPTH(H2*W2)) u_bridge (
    .clk, .rst_n,
    .wr_ready(br_ready), .we(br_we), .waddr(br_waddr), .wdata(br_wdata), .wr_commit(br_commit),
    .rd_valid(br_valid), .raddr(br_raddr), .rdata(br_rdata), .rd_release(br_release)
  );

  assign bridge_full = !br_ready;

  fibha_seml #(
    .H_IN(H2), .W_IN(W2), .C_SRC(C3), .C_MAX(C_MAX), .PAR(SEML_PAR), .NL_MAX(NL_MAX),
    .WDEPTH(WDEPTH), .BDEPTH(BDEPTH), .EXT_AW(EXT_AW)
  ) u_seml (
    .clk, .rst_n,
    .num_layers, .layers,
    .src_valid(br_valid), .src_raddr(br_raddr), .src_rdata(br_rdata), .src_release(br_release),
    .mem_req, .mem_addr, .mem_gnt, .mem_rvalid, .mem_rdata,
    .out_valid, .out_ready, .out_data, .out_last,
    .busy(seml_busy), .fetching(seml_fetching), .layer_idx(seml_layer)
  );

endmodule
