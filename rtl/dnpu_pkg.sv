// dnpu_pkg: types and constants shared by the three DNPU processors.
//
// The processors work on 16-bit dynamic fixed-point data: the word length is fixed
// and the fraction length (FL) is chosen per layer. Convolution and matrix products
// are accumulated at full precision (ACC_W bits) and rounded back to 16 bits only
// when a layer output is written. The activation codes select the functions the
// MLP-RNN processor offers (ReLU, sigmoid, tanh) plus a pass-through.
package dnpu_pkg;

  localparam int DATA_W = 16;  // word length of activations and weights
  localparam int ACC_W  = 40;  // accumulator width (products are 32 bits)
  localparam int FL_W   = 6;   // signed fraction-length / shift fields

  typedef logic signed [DATA_W-1:0] data_t;
  typedef logic signed [ACC_W-1:0]  acc_t;
  typedef logic signed [FL_W-1:0]   fl_t;

  typedef enum logic [1:0] {
    ACT_NONE    = 2'd0,
    ACT_RELU    = 2'd1,
    ACT_SIGMOID = 2'd2,
    ACT_TANH    = 2'd3
  } act_e;

  // Run-time description of one convolution pass (one tile / channel group).
  typedef struct packed {
    logic [9:0]  in_w;      // input tile width
    logic [9:0]  in_h;      // input tile height
    logic [10:0] cin;       // input channels in this pass
    logic [10:0] cout;      // output channels
    logic [4:0]  kw;        // kernel width  (any size, handled in groups of 3)
    logic [4:0]  kh;        // kernel height
    logic [2:0]  stride;    // 1, 2 or 4
    logic        relu;      // apply ReLU
    logic        pool;      // apply 2x2 max pooling
    logic        psum_in;   // start from the partial output already in the output buffer
    logic        final_out; // last channel group: round with the layer FL and activate
    logic [3:0]  layer;     // layer index for the FL table
    fl_t         fl_prod;   // FL of the products = input FL + weight FL
  } conv_cfg_t;

  // Operations of the MLP-RNN processor: the matrix-vector product, or element-wise
  // operations on two vectors of the data buffer (LSTM / GRU gating).
  typedef enum logic [1:0] {
    OP_MATVEC = 2'd0,   // o = act(round(W x i))
    OP_EMUL   = 2'd1,   // o[k] = act(round(a[k] * b[k] >> shift))
    OP_EADD   = 2'd2,   // o[k] = act(sat(a[k] + b[k]))
    OP_EACT   = 2'd3    // o[k] = act(a[k])
  } mlp_op_e;

  // Run-time description of one MLP / RNN operation.
  typedef struct packed {
    logic [11:0] n_in;      // input vector length (including a constant 1 for bias)
    logic [11:0] n_out;     // output vector length
    logic [11:0] in_base;   // data-buffer address of the input vector
    logic [11:0] out_base;  // data-buffer address where the outputs are written
    logic [11:0] w_base;    // weight-index buffer address of the first 8x8 block
    logic [4:0]  shift;     // right shift from product FL to output FL
    act_e        act;       // activation
    logic [3:0]  act_fl;    // FL of the output, used by sigmoid / tanh
    logic        acc_keep;  // continue the accumulators of the previous pass (input split)
    mlp_op_e     op;        // element-wise ops: a at in_base, b at w_base (data buffer), n_out elements
  } mlp_cfg_t;

  // Transfer between processors, scanned as a tw x th tile.
  //   XF_DEPTH_TO_CONV: depth-map pixel (x0+tx, y0+ty) -> conv input word dst_base + ty*tw + tx
  //   XF_CONV_TO_MLP:   conv output word src_base + ty*tw + tx -> MLP data word dst_base + ty*tw + tx
  typedef enum logic {XF_DEPTH_TO_CONV = 1'b0, XF_CONV_TO_MLP = 1'b1} xfer_mode_e;

  typedef struct packed {
    xfer_mode_e  mode;
    logic [8:0]  x0;
    logic [7:0]  y0;
    logic [15:0] src_base;
    logic [15:0] dst_base;
    logic [9:0]  tw;
    logic [9:0]  th;
  } xfer_cfg_t;

endpackage
