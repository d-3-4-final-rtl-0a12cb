// fibha_pkg: types and helpers shared by the FiBHA hybrid CNN accelerator.
//
// Activations and weights are signed 8-bit integers (INT8 quantised model), products are
// accumulated in 32 bits. A "layer" is a fused convolution + batch-normalisation + ReLU:
// batch normalisation is folded into the weights and a per-channel 32-bit bias, and the
// result is requantised by an arithmetic right shift, clipped by ReLU and saturated to
// the INT8 range. The requantisation by shift and the layer descriptor layout are choices
// of this design.
package fibha_pkg;

  localparam int ACT_W = 8;
  localparam int ACC_W = 32;

  typedef logic signed [ACT_W-1:0] act_t;
  typedef logic signed [ACT_W-1:0] wgt_t;
  typedef logic signed [ACC_W-1:0] acc_t;

  // Convolution types found in resource-efficient CNNs.
  typedef enum logic [1:0] {
    LT_STD = 2'd0,   // standard KxK convolution over all input channels
    LT_DW  = 2'd1,   // depthwise KxK convolution, one filter per channel
    LT_PW  = 2'd2    // pointwise 1x1 convolution
  } layer_type_e;

  // Run-time shape of one layer as seen by a convolution engine.
  // Spatial dimensions are those of the input tile; the convolution is "valid"
  // (the tile already carries its halo), so out = (in - k) / stride + 1.
  typedef struct packed {
    layer_type_e ltype;
    logic [1:0]  k;        // kernel size, 1..3
    logic [1:0]  stride;   // 1 or 2
    logic [7:0]  h_in;
    logic [7:0]  w_in;
    logic [9:0]  c_in;
    logic [9:0]  c_out;    // equals c_in for LT_DW
    logic [4:0]  shift;    // requantisation shift
  } layer_cfg_t;

  // One entry of the SEML layer table, written by the host. Weights and biases of the
  // layer sit in off-chip memory at w_base / b_base (word addresses, see fibha_seml).
  typedef struct packed {
    layer_type_e ltype;
    logic [1:0]  k;
    logic [1:0]  stride;
    logic [9:0]  c_in;
    logic [9:0]  c_out;
    logic [4:0]  shift;
    logic [23:0] w_base;
    logic [23:0] b_base;
  } seml_layer_t;

  // Output extent of a valid convolution.
  function automatic logic [7:0] out_dim(logic [7:0] in_dim, logic [1:0] k, logic [1:0] stride);
    logic [7:0] span;
    span = in_dim - 8'(k);
    return (stride == 2'd2) ? 8'((span >> 1) + 8'd1) : 8'(span + 8'd1);
  endfunction

  // Fused BN bias add, shift, ReLU and saturation to INT8.
  function automatic act_t requant(acc_t acc, acc_t bias, logic [4:0] shift);
    acc_t s;
    s = (acc + bias) >>> shift;
    if (s < 0)        return act_t'(0);
    else if (s > 127) return act_t'(127);
    else              return act_t'(s[7:0]);
  endfunction

endpackage
