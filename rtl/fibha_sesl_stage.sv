// fibha_sesl_stage: one engine of the SESL (single engine per single layer) part of FiBHA.
//
// The stage is dedicated to one layer whose shape is fixed by parameters. It owns its
// on-chip weight and bias buffers, loaded once by the host through the wl_*/bl_* ports
// (the requantisation shift is a static input set with them),
// and sits between two double buffers: it starts a tile as soon as its input buffer holds
// a complete tile (in_valid) and its output buffer has a free bank (out_ready), and when
// the engine finishes it releases the input bank and commits the output bank in the same
// cycle. While out_ready is low with a tile waiting, the stage is stalled by the
// downstream stage (reported on 'stalled'). Tile latency is that of fibha_conv_engine
// plus one start cycle.
// Per-layer engines, per-engine weight buffers and double buffering follow the
// accelerator description; the start/commit protocol is this design's.
module fibha_sesl_stage
  import fibha_pkg::*;
#(
  parameter layer_type_e LTYPE = LT_STD,
  parameter int unsigned K      = 3,
  parameter int unsigned STRIDE = 2,
  parameter int unsigned H_IN   = 19,
  parameter int unsigned W_IN   = 19,
  parameter int unsigned C_IN   = 3,
  parameter int unsigned C_OUT  = 32,
  parameter int unsigned PAR    = 32,
  localparam int unsigned G      = ((LTYPE == LT_DW ? C_IN : C_OUT) + PAR - 1) / PAR,
  localparam int unsigned WDEPTH = G * K * K * (LTYPE == LT_DW ? 1 : C_IN),
  localparam int unsigned BDEPTH = G,
  localparam int unsigned PIXAW  = $clog2(H_IN*W_IN),
  localparam int unsigned OH     = (H_IN - K) / STRIDE + 1,
  localparam int unsigned OW     = (W_IN - K) / STRIDE + 1,
  localparam int unsigned OPIXAW = (OH*OW > 1) ? $clog2(OH*OW) : 1,
  localparam int unsigned WAW    = (WDEPTH > 1) ? $clog2(WDEPTH) : 1,
  localparam int unsigned BAW    = (BDEPTH > 1) ? $clog2(BDEPTH) : 1
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic [4:0]          shift,       // requantisation shift of this layer
  // weight / bias loading
  input  logic                wl_we,
  input  logic [15:0]         wl_addr,     // low WAW bits used
  input  wgt_t [PAR-1:0]      wl_data,
  input  logic                bl_we,
  input  logic [7:0]          bl_addr,     // low BAW bits used
  input  acc_t [PAR-1:0]      bl_data,
  // upstream double buffer (consumer side)
  input  logic                in_valid,
  output logic [PIXAW-1:0]    in_raddr,
  input  act_t [C_IN-1:0]     in_rdata,
  output logic                in_release,
  // downstream double buffer (producer side)
  input  logic                out_ready,
  output logic                out_we,
  output logic [OPIXAW-1:0]   out_waddr,
  output act_t [C_OUT-1:0]    out_wdata,
  output logic                out_commit,
  // status
  output logic                busy,
  output logic                stalled
);

  layer_cfg_t cfg;
  assign cfg = '{
    ltype:  LTYPE,
    k:      2'(K),
    stride: 2'(STRIDE),
    h_in:   8'(H_IN),
    w_in:   8'(W_IN),
    c_in:   10'(C_IN),
    c_out:  10'(C_OUT),
    shift:  shift
  };

  logic [WAW-1:0] w_raddr;
  logic [BAW-1:0] b_raddr;
  wgt_t [PAR-1:0] w_rdata;
  acc_t [PAR-1:0] b_rdata;
  logic           eng_busy, eng_done, start;
  logic [PIXAW-1:0] eng_waddr;

  fibha_ram #(.WIDTH(PAR*ACT_W), .DEPTH(WDEPTH)) u_wbuf (
    .clk, .we(wl_we), .waddr(WAW'(wl_addr)), .wdata(wl_data), .raddr(w_raddr), .rdata(w_rdata)
  );
  fibha_ram #(.WIDTH(PAR*ACC_W), .DEPTH(BDEPTH)) u_bbuf (
    .clk, .we(bl_we), .waddr(BAW'(bl_addr)), .wdata(bl_data), .raddr(b_raddr), .rdata(b_rdata)
  );

  assign start = !eng_busy && in_valid && out_ready;

  fibha_conv_engine #(
    .H_MAX(H_IN), .W_MAX(W_IN), .CI_MAX(C_IN), .CO_MAX(C_OUT), .PAR(PAR),
    .WDEPTH(WDEPTH), .BDEPTH(BDEPTH)
  ) u_eng (
    .clk, .rst_n, .start, .cfg(cfg), .busy(eng_busy), .done(eng_done),
    .in_raddr, .in_rdata, .w_raddr, .w_rdata, .b_raddr, .b_rdata,
    .out_we, .out_waddr(eng_waddr), .out_wdata
  );

  assign out_waddr  = OPIXAW'(eng_waddr);
  assign in_release = eng_done;
  assign out_commit = eng_done;
  assign busy       = eng_busy;
  assign stalled    = !eng_busy && in_valid && !out_ready;

endmodule
