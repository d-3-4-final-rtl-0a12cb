// dl_accel_top: the two FPGA deep-learning accelerators of this repository, side by side.
//
//   * fibha_*  : FiBHA, a hybrid CNN accelerator. A pipeline of per-layer engines (SESL)
//                runs the first CNN layers tile by tile, a double buffer hands each tile
//                to a single reusable engine (SEML) that runs the remaining layers with
//                weights streamed from off-chip memory. See fibha_top.
//   * stann_*  : the arc-detection classifier: a front end that turns each 160-sample
//                frame into the spectra of its first 128 and last 32 samples
//                (stann_smp_* in, stann_spec_* out; see stann_fft_frontend), and a
//                dataflow network of four fully connected layers built from systolic
//                block-matrix-multiply layers that classifies the 320 normalised
//                time/frequency features (stann_in_* / stann_out_*; see stann_mlp).
//                Normalising and concatenating the features is left to the host, so
//                the spectrum stream and the feature stream are separate ports.
// The two share only clock and reset; each keeps its own ports, named as in its own
// top with a prefix. They are independent designs and may be used separately.
// Both accelerators follow published designs for FPGA edge inference; placing them in one
// top with prefixed ports is this design's choice.
module dl_accel_top
  import fibha_pkg::*;
(
  input  logic                 clk,
  input  logic                 rst_n,
  // ---------------- FiBHA ----------------
  output logic                 fibha_in_ready,
  input  logic                 fibha_in_we,
  input  logic [8:0]           fibha_in_waddr,
  input  act_t [2:0]           fibha_in_wdata,
  input  logic                 fibha_in_commit,
  input  logic [2:0][4:0]      fibha_sesl_shift,
  input  logic [1:0]           fibha_wl_stage,
  input  logic                 fibha_wl_we,
  input  logic [15:0]          fibha_wl_addr,
  input  wgt_t [31:0]          fibha_wl_data,
  input  logic                 fibha_bl_we,
  input  logic [7:0]           fibha_bl_addr,
  input  acc_t [31:0]          fibha_bl_data,
  input  logic [3:0]           fibha_num_layers,
  input  seml_layer_t          fibha_layers [8],
  output logic                 fibha_mem_req,
  output logic [23:0]          fibha_mem_addr,
  input  logic                 fibha_mem_gnt,
  input  logic                 fibha_mem_rvalid,
  input  wgt_t [15:0]          fibha_mem_rdata,
  output logic                 fibha_out_valid,
  input  logic                 fibha_out_ready,
  output act_t [95:0]          fibha_out_data,
  output logic                 fibha_out_last,
  output logic [2:0]           fibha_sesl_busy,
  output logic [2:0]           fibha_sesl_stalled,
  output logic                 fibha_bridge_full,
  output logic                 fibha_seml_busy,
  output logic                 fibha_seml_fetching,
  output logic [3:0]           fibha_seml_layer,
  // ---------------- STANN classifier ----------------
  input  logic [1:0]           stann_w_layer,
  input  logic                 stann_w_we,
  input  logic [15:0]          stann_w_addr,
  input  logic signed [15:0]   stann_w_data,
  input  logic                 stann_b_we,
  input  logic [7:0]           stann_b_addr,
  input  logic signed [15:0]   stann_b_data,
  input  logic                 stann_in_valid,
  output logic                 stann_in_ready,
  input  logic signed [15:0]   stann_in_data,
  output logic                 stann_out_valid,
  input  logic                 stann_out_ready,
  output logic signed [15:0]   stann_out_data,
  input  logic                 stann_smp_valid,
  output logic                 stann_smp_ready,
  input  logic signed [15:0]   stann_smp_data,
  output logic                 stann_spec_valid,
  input  logic                 stann_spec_ready,
  output logic [23:0]          stann_spec_data,
  output logic                 stann_spec_last
);

  fibha_top u_fibha (
    .clk, .rst_n,
    .in_ready(fibha_in_ready), .in_we(fibha_in_we), .in_waddr(fibha_in_waddr),
    .in_wdata(fibha_in_wdata), .in_commit(fibha_in_commit),
    .sesl_shift(fibha_sesl_shift), .wl_stage(fibha_wl_stage), .wl_we(fibha_wl_we),
    .wl_addr(fibha_wl_addr), .wl_data(fibha_wl_data), .bl_we(fibha_bl_we),
    .bl_addr(fibha_bl_addr), .bl_data(fibha_bl_data),
    .num_layers(fibha_num_layers), .layers(fibha_layers),
    .mem_req(fibha_mem_req), .mem_addr(fibha_mem_addr), .mem_gnt(fibha_mem_gnt),
    .mem_rvalid(fibha_mem_rvalid), .mem_rdata(fibha_mem_rdata),
    .out_valid(fibha_out_valid), .out_ready(fibha_out_ready), .out_data(fibha_out_data),
    .out_last(fibha_out_last),
    .sesl_busy(fibha_sesl_busy), .sesl_stalled(fibha_sesl_stalled),
    .bridge_full(fibha_bridge_full), .seml_busy(fibha_seml_busy),
    .seml_fetching(fibha_seml_fetching), .seml_layer(fibha_seml_layer)
  );

  stann_mlp u_stann (
    .clk, .rst_n,
    .w_layer(stann_w_layer), .w_we(stann_w_we), .w_addr(stann_w_addr), .w_data(stann_w_data),
    .b_we(stann_b_we), .b_addr(stann_b_addr), .b_data(stann_b_data),
    .in_valid(stann_in_valid), .in_ready(stann_in_ready), .in_data(stann_in_data),
    .out_valid(stann_out_valid), .out_ready(stann_out_ready), .out_data(stann_out_data)
  );

  stann_fft_frontend u_stann_fe (
    .clk, .rst_n,
    .in_valid(stann_smp_valid), .in_ready(stann_smp_ready), .in_data(stann_smp_data),
    .spec_valid(stann_spec_valid), .spec_ready(stann_spec_ready), .spec_data(stann_spec_data),
    .spec_last(stann_spec_last)
  );

endmodule
