// fibha_seml: the SEML (single engine, multiple layers) part of FiBHA, which runs the
// later, less heterogeneous layers of the CNN one after the other on one reusable engine.
//
// A tile produced by the SESL part arrives in the bridge double buffer (src_*). The
// controller walks the host-written layer table; for every layer it
//   1. FETCH: streams the layer's weights and biases from off-chip memory into the
//      on-chip layer weight/bias buffers (the late layers' weights are too large to keep
//      on chip). Requests use a valid/ready pair (mem_req/mem_gnt), responses return in
//      order on mem_rvalid, so several requests may be in flight. Weight words are PAR
//      INT8 weights in the engine's layout; each PAR x 32-bit bias word arrives as four
//      consecutive memory words, lowest bits first.
//   2. RUN: configures the engine (type, kernel, stride, channels, current tile size)
//      and runs it. Layer 0 reads the bridge buffer and writes local buffer 0; each later
//      layer reads the buffer the previous layer wrote and writes the other, so the two
//      local buffers alternate between input and output. When layer 0 finishes, the
//      bridge bank is released, letting the SESL part deliver the next tile while the
//      remaining layers run (the SESL and SEML parts work on different inputs at once).
//   3. After the last layer the result tile is streamed out pixel by pixel on
//      out_valid/out_ready (channels above the last layer's c_out read as zero), for the
//      host processor, which runs the fully connected classifier.
// The published architecture leaves the SEML part open (any SEML design may be used); a single engine
// handling both depthwise and pointwise layers, the descriptor table, the memory protocol
// and the fetch-then-compute order are this design's choices.
module fibha_seml
  import fibha_pkg::*;
#(
  parameter int unsigned H_IN   = 7,     // tile height delivered by the SESL part
  parameter int unsigned W_IN   = 7,
  parameter int unsigned C_SRC  = 16,    // channels of the bridge buffer
  parameter int unsigned C_MAX  = 96,    // widest layer handled
  parameter int unsigned PAR    = 16,    // MAC lanes
  parameter int unsigned NL_MAX = 8,     // layer table entries
  parameter int unsigned WDEPTH = 1024,  // layer weight buffer words
  parameter int unsigned BDEPTH = 8,     // layer bias buffer words
  parameter int unsigned EXT_AW = 24,
  localparam int unsigned PIXAW = $clog2(H_IN*W_IN),
  localparam int unsigned WAW   = (WDEPTH > 1) ? $clog2(WDEPTH) : 1,
  localparam int unsigned BAW   = (BDEPTH > 1) ? $clog2(BDEPTH) : 1,
  localparam int unsigned LAW   = $clog2(NL_MAX + 1)
) (
  input  logic                 clk,
  input  logic                 rst_n,
  // layer table
  input  logic [LAW-1:0]       num_layers,
  input  seml_layer_t          layers [NL_MAX],
  // bridge double buffer, consumer side
  input  logic                 src_valid,
  output logic [PIXAW-1:0]     src_raddr,
  input  act_t [C_SRC-1:0]     src_rdata,
  output logic                 src_release,
  // off-chip weight memory
  output logic                 mem_req,
  output logic [EXT_AW-1:0]    mem_addr,
  input  logic                 mem_gnt,
  input  logic                 mem_rvalid,
  input  wgt_t [PAR-1:0]       mem_rdata,
  // result stream
  output logic                 out_valid,
  input  logic                 out_ready,
  output act_t [C_MAX-1:0]     out_data,
  output logic                 out_last,
  // status
  output logic                 busy,
  output logic                 fetching,
  output logic [LAW-1:0]       layer_idx
);

  typedef enum logic [2:0] {S_IDLE, S_FETCH, S_START, S_RUN, S_OUT} state_e;
  state_e state;

  logic [LAW-1:0] l;
  logic [7:0]     h, w;
  logic           wsel;                  // local buffer the engine writes
  logic [15:0]    nreq, nrsp, nw, ntot;
  logic [PIXAW-1:0] oidx;
  acc_t [PAR-1:0] bias_asm;

  seml_layer_t cur;
  assign cur = (32'(l) < NL_MAX) ? layers[$clog2(NL_MAX)'(l)] : '0;

  // Words the current layer needs.
  logic [15:0] groups, nic;
  assign groups = 16'(((cur.ltype == LT_DW ? 32'(cur.c_in) : 32'(cur.c_out)) + PAR - 1) / PAR);
  assign nic    = (cur.ltype == LT_DW) ? 16'd1 : 16'(cur.c_in);

  // Weight and bias buffers.
  logic             wb_we, bb_we;
  logic [WAW-1:0]   w_raddr;
  logic [BAW-1:0]   b_raddr;
  wgt_t [PAR-1:0]   w_rdata;
  acc_t [PAR-1:0]   b_rdata, b_wdata;

  fibha_ram #(.WIDTH(PAR*ACT_W), .DEPTH(WDEPTH)) u_wbuf (
    .clk, .we(wb_we), .waddr(WAW'(nrsp)), .wdata(mem_rdata), .raddr(w_raddr), .rdata(w_rdata)
  );
  fibha_ram #(.WIDTH(PAR*ACC_W), .DEPTH(BDEPTH)) u_bbuf (
    .clk, .we(bb_we), .waddr(BAW'((nrsp - nw) >> 2)), .wdata(b_wdata), .raddr(b_raddr), .rdata(b_rdata)
  );

  logic in_bias;
  logic [1:0] piece;
  assign in_bias = (nrsp >= nw);
  assign piece   = 2'(nrsp - nw);
  assign wb_we   = (state == S_FETCH) && mem_rvalid && !in_bias;
  assign bb_we   = (state == S_FETCH) && mem_rvalid && in_bias && (piece == 2'd3);
  assign b_wdata = {mem_rdata, bias_asm[PAR-1 -: (PAR - PAR/4)]};

  assign mem_req  = (state == S_FETCH) && (nreq < ntot);
  assign mem_addr = (nreq < nw) ? EXT_AW'(cur.w_base + 24'(nreq)) : EXT_AW'(cur.b_base + 24'(nreq - nw));

  // Engine.
  layer_cfg_t ecfg;
  logic eng_start, eng_done, eng_we;
  logic [PIXAW-1:0] eng_raddr, eng_waddr;
  act_t [C_MAX-1:0] eng_rdata, eng_wdata;
  act_t [C_MAX-1:0] lbuf [2][H_IN*W_IN];

  always_comb begin
    ecfg.ltype  = cur.ltype;
    ecfg.k      = cur.k;
    ecfg.stride = cur.stride;
    ecfg.h_in   = h;
    ecfg.w_in   = w;
    ecfg.c_in   = cur.c_in;
    ecfg.c_out  = (cur.ltype == LT_DW) ? cur.c_in : cur.c_out;
    ecfg.shift  = cur.shift;
  end

  assign eng_start = (state == S_START);
  assign src_raddr = eng_raddr;

  always_comb begin
    eng_rdata = '0;
    if (l == '0) begin
      for (int c = 0; c < C_SRC; c++) eng_rdata[c] = src_rdata[c];
    end else if (32'(eng_raddr) < H_IN*W_IN) begin
      eng_rdata = lbuf[!wsel][eng_raddr];
    end
  end

  fibha_conv_engine #(
    .H_MAX(H_IN), .W_MAX(W_IN), .CI_MAX(C_MAX), .CO_MAX(C_MAX), .PAR(PAR),
    .WDEPTH(WDEPTH), .BDEPTH(BDEPTH)
  ) u_eng (
    .clk, .rst_n, .start(eng_start), .cfg(ecfg), .busy(), .done(eng_done),
    .in_raddr(eng_raddr), .in_rdata(eng_rdata),
    .w_raddr, .w_rdata, .b_raddr, .b_rdata,
    .out_we(eng_we), .out_waddr(eng_waddr), .out_wdata(eng_wdata)
  );

  always_ff @(posedge clk) begin
    if (eng_we && (32'(eng_waddr) < H_IN*W_IN)) lbuf[wsel][eng_waddr] <= eng_wdata;
  end

  assign src_release = (state == S_RUN) && eng_done && (l == '0);

  // Result stream: the buffer written by the last layer.
  assign out_valid = (state == S_OUT);
  assign out_data  = lbuf[!wsel][oidx];
  assign out_last  = (state == S_OUT) && (16'(oidx) == 16'(h) * 16'(w) - 16'd1);

  assign busy      = (state != S_IDLE);
  assign fetching  = (state == S_FETCH);
  assign layer_idx = l;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= S_IDLE;
      l <= '0; h <= '0; w <= '0; wsel <= 1'b0;
      nreq <= '0; nrsp <= '0; nw <= '0; ntot <= '0;
      oidx <= '0;
      bias_asm <= '0;
    end else begin
      unique case (state)
        S_IDLE: if (src_valid && num_layers != '0) begin
          l <= '0;
          h <= 8'(H_IN);
          w <= 8'(W_IN);
          wsel <= 1'b0;
          state <= S_FETCH;
          nreq <= '0; nrsp <= '0; nw <= '0; ntot <= '0;
        end
        S_FETCH: begin
          // Word counts are latched in the first fetch cycle (nreq == nrsp == 0).
          if (nreq == '0 && nrsp == '0 && ntot == '0) begin
            nw   <= groups * 16'(cur.k) * 16'(cur.k) * nic;
            ntot <= groups * 16'(cur.k) * 16'(cur.k) * nic + groups * 16'd4;
          end else begin
            if (mem_req && mem_gnt) nreq <= nreq + 16'd1;
            if (mem_rvalid) begin
              nrsp <= nrsp + 16'd1;
              if (in_bias) begin
                bias_asm <= b_wdata;   // shift register; bb_we stores it on piece 3
              end
              if (nrsp + 16'd1 == ntot) state <= S_START;
            end
          end
        end
        S_START: state <= S_RUN;
        S_RUN: if (eng_done) begin
          h <= out_dim(h, cur.k, cur.stride);
          w <= out_dim(w, cur.k, cur.stride);
          wsel <= !wsel;
          nreq <= '0; nrsp <= '0; nw <= '0; ntot <= '0;
          if (32'(l) + 1 == 32'(num_layers)) begin
            oidx <= '0;
            state <= S_OUT;
          end else begin
            l <= l + 1'b1;
            state <= S_FETCH;
          end
        end
        S_OUT: if (out_ready) begin
          if (out_last) state <= S_IDLE;
          else oidx <= oidx + 1'b1;
        end
        default: state <= S_IDLE;
      endcase
    end
  end

  if (PAR % 4 != 0) begin : g_par_check
    $error("fibha_seml: PAR must be a multiple of 4");
  end

  a_table_fits: assert property (@(posedge clk) disable iff (!rst_n)
      (state == S_IDLE && src_valid) |-> (32'(num_layers) <= NL_MAX))
    else $error("seml: layer table longer than NL_MAX");
  a_weights_fit: assert property (@(posedge clk) disable iff (!rst_n)
      (state == S_START) |-> (32'(nw) <= WDEPTH && 32'(groups) <= BDEPTH && 32'(cur.c_in) <= C_MAX
                              && 32'(cur.c_out) <= C_MAX))
    else $error("seml: layer does not fit the engine buffers");

endmodule
