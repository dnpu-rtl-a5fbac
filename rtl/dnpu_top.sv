// dnpu_top: heterogeneous deep-neural-network processor with on-chip stereo matching.
//
// Three processors, each with its own buffers and sequencer, sit side by side:
//   conv_core     convolution layers (three-wide MAC row, dynamic fixed-point with
//                 on-line FL adaptation, ReLU, 2x2 pooling, partial-output passes);
//   mlp_rnn_core  fully-connected and recurrent layers (4-bit weight indices, Q-table
//                 multiplication, ReLU / sigmoid / tanh);
//   stereo_proc   depth map of a QVGA stereo pair with 64 depth levels.
// A transfer engine joins them the way the workloads need: a tile of the depth map is
// copied into a channel of the convolution input buffer (RGB-D, four-channel input:
// the host loads R, G and B and the engine adds depth), and convolution outputs are
// copied into the MLP-RNN data buffer (CNN features as RNN input). The engine moves one
// word per cycle; while it runs it owns the buffer ports it uses and the host ports of
// those buffers are ignored.
// The three processors and the two data paths between them follow the design
// description; the transfer engine, its tile addressing and the depth value copied as a
// plain integer are this design's choices. Everything is in one clock domain.
//
// Interface: each processor's start/cfg/busy/done and buffer ports are brought out
// unchanged; xfer_start with xfer_cfg starts a transfer, xfer_done pulses at its end.
module dnpu_top
  import dnpu_pkg::*;
#(
  parameter int CONV_IN_DEPTH  = 16384,
  parameter int CONV_W_DEPTH   = 8192,
  parameter int CONV_OUT_DEPTH = 4096,
  parameter int MLP_DATA_DEPTH = 4096,
  parameter int MLP_W_DEPTH    = 512,
  parameter int MLP_ACC_DEPTH  = 1024,
  parameter int SM_W           = 320,
  parameter int SM_H           = 240,
  parameter int SM_ND          = 64,
  parameter int SM_WR          = 3,
  localparam int CIAW = $clog2(CONV_IN_DEPTH),
  localparam int CWAW = $clog2(CONV_W_DEPTH),
  localparam int COAW = $clog2(CONV_OUT_DEPTH),
  localparam int MDAW = $clog2(MLP_DATA_DEPTH),
  localparam int MWAW = $clog2(MLP_W_DEPTH),
  localparam int PAW  = $clog2(SM_W * SM_H),
  localparam int DPW  = $clog2(SM_ND)
) (
  input  logic             clk,
  input  logic             rst_n,
  // ---- convolution processor ----
  input  logic             conv_start,
  input  conv_cfg_t        conv_cfg,
  output logic             conv_busy,
  output logic             conv_done,
  input  logic             conv_in_we,
  input  logic [CIAW-1:0]  conv_in_addr,
  input  data_t            conv_in_wdata,
  input  logic             conv_w_we,
  input  logic [CWAW-1:0]  conv_w_addr,
  input  data_t            conv_w_wdata,
  input  logic             conv_out_we,
  input  logic [COAW-1:0]  conv_out_addr,
  input  data_t            conv_out_wdata,
  output data_t            conv_out_rdata,
  input  logic             conv_fl_wr_en,
  input  logic [3:0]       conv_fl_wr_layer,
  input  fl_t              conv_fl_wr_val,
  input  logic [4:0]       conv_fl_wr_wl,
  output fl_t              conv_fl_layer,
  output logic [4:0]       conv_wl_layer,
  output logic [31:0]      conv_mac_cycles,
  output logic [31:0]      conv_lane_ops,
  output logic [31:0]      conv_ovf_cnt,
  // ---- MLP-RNN processor ----
  input  logic             mlp_start,
  input  mlp_cfg_t         mlp_cfg,
  output logic             mlp_busy,
  output logic             mlp_done,
  input  logic             mlp_d_we,
  input  logic [MDAW-1:0]  mlp_d_addr,
  input  data_t            mlp_d_wdata,
  output data_t            mlp_d_rdata,
  input  logic             mlp_w_we,
  input  logic [MWAW-1:0]  mlp_w_addr,
  input  logic [255:0]     mlp_w_wdata,
  input  logic             mlp_cb_we,
  input  logic [3:0]       mlp_cb_idx,
  input  data_t            mlp_cb_wdata,
  output logic [31:0]      mlp_qt_builds,
  output logic [31:0]      mlp_lut_mults,
  output logic [31:0]      mlp_elem_ops,
  // ---- stereo matching processor ----
  input  logic             sm_start,
  output logic             sm_busy,
  output logic             sm_done,
  input  logic             sm_l_we,
  input  logic             sm_r_we,
  input  logic [PAW-1:0]   sm_pix_addr,
  input  logic [7:0]       sm_pix_wdata,
  input  logic [PAW-1:0]   sm_dm_addr,
  output logic [DPW-1:0]   sm_dm_rdata,
  output logic [31:0]      sm_updates,
  // ---- transfer engine ----
  input  logic             xfer_start,
  input  xfer_cfg_t        xfer_cfg,
  output logic             xfer_busy,
  output logic             xfer_done
);

  // ---------------- transfer engine ----------------
  xfer_cfg_t   xc;
  logic [9:0]  tx, ty;
  logic [31:0] t_off, src_addr, dst_addr;

  always_comb begin
    t_off    = 32'(ty) * 32'(xc.tw) + 32'(tx);
    dst_addr = 32'(xc.dst_base) + t_off;
    if (xc.mode == XF_DEPTH_TO_CONV)
      src_addr = (32'(xc.y0) + 32'(ty)) * SM_W + 32'(xc.x0) + 32'(tx);
    else
      src_addr = 32'(xc.src_base) + t_off;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      xfer_busy <= 1'b0;
      xfer_done <= 1'b0;
      xc        <= '0;
      tx        <= '0;
      ty        <= '0;
    end else begin
      xfer_done <= 1'b0;
      if (!xfer_busy) begin
        if (xfer_start) begin
          xc        <= xfer_cfg;
          tx        <= '0;
          ty        <= '0;
          xfer_busy <= 1'b1;
        end
      end else if (tx == xc.tw - 1'b1) begin
        tx <= '0;
        if (ty == xc.th - 1'b1) begin
          xfer_busy <= 1'b0;
          xfer_done <= 1'b1;
        end else ty <= ty + 1'b1;
      end else tx <= tx + 1'b1;
    end
  end

  logic xf_d2c, xf_c2m;
  assign xf_d2c = xfer_busy && xc.mode == XF_DEPTH_TO_CONV;
  assign xf_c2m = xfer_busy && xc.mode == XF_CONV_TO_MLP;

  // ---------------- processors ----------------
  logic [DPW-1:0] dm_rdata;
  data_t          c_out_rdata;

  conv_core #(
    .IN_DEPTH (CONV_IN_DEPTH),
    .W_DEPTH  (CONV_W_DEPTH),
    .OUT_DEPTH(CONV_OUT_DEPTH),
    .NLAYER   (16)
  ) u_conv (
    .clk, .rst_n,
    .start      (conv_start),
    .cfg        (conv_cfg),
    .busy       (conv_busy),
    .done       (conv_done),
    .in_we      (xf_d2c ? 1'b1 : conv_in_we),
    .in_addr    (xf_d2c ? CIAW'(dst_addr) : conv_in_addr),
    .in_wdata   (xf_d2c ? data_t'(dm_rdata) : conv_in_wdata),
    .w_we       (conv_w_we),
    .w_addr     (conv_w_addr),
    .w_wdata    (conv_w_wdata),
    .out_we     (xf_c2m ? 1'b0 : conv_out_we),
    .out_addr   (xf_c2m ? COAW'(src_addr) : conv_out_addr),
    .out_wdata  (conv_out_wdata),
    .out_rdata  (c_out_rdata),
    .fl_wr_en   (conv_fl_wr_en),
    .fl_wr_layer(conv_fl_wr_layer),
    .fl_wr_val  (conv_fl_wr_val),
    .fl_wr_wl   (conv_fl_wr_wl),
    .fl_layer   (conv_fl_layer),
    .wl_layer   (conv_wl_layer),
    .mac_cycles (conv_mac_cycles),
    .lane_ops   (conv_lane_ops),
    .ovf_cnt    (conv_ovf_cnt)
  );
  assign conv_out_rdata = c_out_rdata;

  mlp_rnn_core #(
    .NQ        (8),
    .QB        (4),
    .DATA_DEPTH(MLP_DATA_DEPTH),
    .W_DEPTH   (MLP_W_DEPTH),
    .ACC_DEPTH (MLP_ACC_DEPTH)
  ) u_mlp (
    .clk, .rst_n,
    .start    (mlp_start),
    .cfg      (mlp_cfg),
    .busy     (mlp_busy),
    .done     (mlp_done),
    .d_we     (xf_c2m ? 1'b1 : mlp_d_we),
    .d_addr   (xf_c2m ? MDAW'(dst_addr) : mlp_d_addr),
    .d_wdata  (xf_c2m ? c_out_rdata : mlp_d_wdata),
    .d_rdata  (mlp_d_rdata),
    .w_we     (mlp_w_we),
    .w_addr   (mlp_w_addr),
    .w_wdata  (mlp_w_wdata),
    .cb_we    (mlp_cb_we),
    .cb_idx   (mlp_cb_idx),
    .cb_wdata (mlp_cb_wdata),
    .qt_builds(mlp_qt_builds),
    .lut_mults(mlp_lut_mults),
    .elem_ops (mlp_elem_ops)
  );

  stereo_proc #(
    .W (SM_W),
    .H (SM_H),
    .ND(SM_ND),
    .WR(SM_WR)
  ) u_sm (
    .clk, .rst_n,
    .start    (sm_start),
    .busy     (sm_busy),
    .done     (sm_done),
    .l_we     (sm_l_we),
    .r_we     (sm_r_we),
    .pix_addr (sm_pix_addr),
    .pix_wdata(sm_pix_wdata),
    .dm_addr  (xf_d2c ? PAW'(src_addr) : sm_dm_addr),
    .dm_rdata (dm_rdata),
    .updates  (sm_updates)
  );
  assign sm_dm_rdata = dm_rdata;

  // The engine must not write a buffer its processor is using.
  assert property (@(posedge clk) disable iff (!rst_n) xf_d2c |-> !conv_busy);
  assert property (@(posedge clk) disable iff (!rst_n) xf_c2m |-> !conv_busy && !mlp_busy);

endmodule
