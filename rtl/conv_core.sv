// conv_core: convolution processor engine with distributed input, weight and output buffers.
//
// One pass computes a convolution of a cin x in_h x in_w input tile with cout kernels
// of size kh x kw (any size), stride 1, 2 or 4, without padding. The datapath is a row
// of three multipliers that take three horizontally adjacent kernel taps per cycle, so
// a kernel row of width 3n keeps all three busy and a 1x1 kernel uses one in three.
// Products are summed into a 40-bit accumulator; an output pixel takes
// cin * kh * ceil(kw/3) MAC cycles plus one post-processing cycle.
//
// Post-processing rounds the accumulator through dfxp_unit to the word and fraction
// length of the layer, then applies ReLU and 2x2 max pooling when enabled. With pooling the four
// pixels of a pooling window are computed back to back and only their maximum is written.
//
// Channel division (part of the mixed workload division): a layer whose input channels
// do not fit is run as several passes. A pass with psum_in=1 starts every accumulator
// from the partial output already in the output buffer, and only the pass with
// final_out=1 applies ReLU and pooling. Partial passes write the unpooled layout; a
// final pass with pooling reads the partial output of each of the four pixels of a
// window and writes the pooled word in place. This is safe because the pooled index
// of a window never exceeds the unpooled index of any pixel still to be read.
// Image division is the host's choice of tiles.
//
// Buffer layouts (word addresses):
//   input  [ci][y][x]          = ci*in_h*in_w + y*in_w + x
//   weight [co][ci][ky][kx]    = ((co*cin + ci)*kh + ky)*kw + kx
//   output [co][y][x]          = co*oh*ow + y*ow + x     (oh, ow after pooling)
// The three-wide MAC, the strides, 2x2 pooling, ReLU, any kernel and channel count and
// the partial-output passes follow the design description; the buffer sizes, the
// layouts, the absence of padding and bias, and the one-pass-at-a-time control are this
// design's own choices.
//
// Interface: pulse start with cfg valid; busy stays high until the done pulse. Host
// ports write the buffers and read the output buffer; they must not be used while busy.
module conv_core
  import dnpu_pkg::*;
#(
  parameter int IN_DEPTH  = 16384,  // input buffer words (32 KB)
  parameter int W_DEPTH   = 8192,   // weight buffer words (16 KB)
  parameter int OUT_DEPTH = 4096,   // output buffer words (8 KB)
  parameter int NLAYER    = 16,
  localparam int IAW = $clog2(IN_DEPTH),
  localparam int WAW = $clog2(W_DEPTH),
  localparam int OAW = $clog2(OUT_DEPTH),
  localparam int LW  = $clog2(NLAYER)
) (
  input  logic            clk,
  input  logic            rst_n,
  // control
  input  logic            start,
  input  conv_cfg_t       cfg,
  output logic            busy,
  output logic            done,
  // host access
  input  logic            in_we,
  input  logic [IAW-1:0]  in_addr,
  input  data_t           in_wdata,
  input  logic            w_we,
  input  logic [WAW-1:0]  w_addr,
  input  data_t           w_wdata,
  input  logic            out_we,
  input  logic [OAW-1:0]  out_addr,
  input  data_t           out_wdata,
  output data_t           out_rdata,
  // FL table
  input  logic            fl_wr_en,
  input  logic [LW-1:0]   fl_wr_layer,
  input  fl_t             fl_wr_val,
  input  logic [4:0]      fl_wr_wl,
  output fl_t             fl_layer,     // current FL of cfg.layer
  output logic [4:0]      wl_layer,     // WL of cfg.layer
  // statistics
  output logic [31:0]     mac_cycles,   // cycles with the MAC row active
  output logic [31:0]     lane_ops,     // multiplier operations that did work
  output logic [31:0]     ovf_cnt       // saturations in the last pass
);

  typedef enum logic [2:0] {S_IDLE, S_MAC, S_POST, S_END} state_e;
  state_e state;

  data_t in_mem  [IN_DEPTH];
  data_t w_mem   [W_DEPTH];
  data_t out_mem [OUT_DEPTH];

  conv_cfg_t c;
  logic [9:0]  ow, oh;        // convolution output size
  logic [9:0]  pw, ph;        // written output size
  logic        pool_en, relu_en;
  logic [10:0] co, ci;
  logic [9:0]  px, py;
  logic [1:0]  sub;
  logic [4:0]  ky, kg;        // kernel row, group of three columns
  logic [4:0]  ngrp;          // ceil(kw/3)
  acc_t        acc;
  data_t       pmax;

  // --------------- sizes of the pass being started ---------------
  logic [1:0] sshift;
  always_comb begin
    unique case (cfg.stride)
      3'd2:    sshift = 2'd1;
      3'd4:    sshift = 2'd2;
      default: sshift = 2'd0;
    endcase
  end

  // --------------- addresses ---------------
  logic [9:0]  oy, ox;
  logic [31:0] iy, ix0, in_base, w_base, o_addr, p_addr;
  logic [1:0]  ssh_q;
  always_comb begin
    oy      = pool_en ? {py[8:0], sub[1]} : py;
    ox      = pool_en ? {px[8:0], sub[0]} : px;
    iy      = (32'(oy) << ssh_q) + 32'(ky);
    ix0     = (32'(ox) << ssh_q) + 32'(kg) * 3;
    in_base = 32'(ci) * 32'(c.in_h) * 32'(c.in_w) + iy * 32'(c.in_w) + ix0;
    w_base  = ((32'(co) * 32'(c.cin) + 32'(ci)) * 32'(c.kh) + 32'(ky)) * 32'(c.kw) + 32'(kg) * 3;
    o_addr  = 32'(co) * 32'(ph) * 32'(pw) + 32'(py) * 32'(pw) + 32'(px);
    p_addr  = 32'(co) * 32'(oh) * 32'(ow) + 32'(oy) * 32'(ow) + 32'(ox);  // partial output
  end

  // --------------- three-wide MAC row ---------------
  acc_t  prod_sum;
  logic [1:0] nlanes;
  always_comb begin
    prod_sum = '0;
    nlanes   = '0;
    for (int l = 0; l < 3; l++) begin
      if (32'(kg) * 3 + 32'(l) < 32'(c.kw)) begin
        prod_sum = prod_sum + acc_t'(in_mem[IAW'(in_base + 32'(l))] * w_mem[WAW'(w_base + 32'(l))]);
        nlanes   = nlanes + 1'b1;
      end
    end
  end

  // --------------- dynamic fixed-point ---------------
  data_t q;
  logic  q_ovf;
  fl_t   fl_cur;
  acc_t  psum_init;
  logic  mon_start, mon_valid, mon_end;
  logic  hi_used;
  logic signed [FL_W:0] init_sh;

  dfxp_unit #(.NLAYER(NLAYER)) u_dfxp (
    .clk, .rst_n,
    .fl_wr_en, .fl_wr_layer, .fl_wr_val, .fl_wr_wl,
    .layer     (busy ? c.layer[LW-1:0] : cfg.layer[LW-1:0]),
    .fl_out    (fl_cur),
    .wl_out    (wl_layer),
    .acc_in    (acc),
    .fl_prod   (c.fl_prod),
    .q_out     (q),
    .q_ovf     (q_ovf),
    .mon_start (mon_start),
    .mon_valid (mon_valid),
    .mon_end   (mon_end),
    .ovf_cnt   (ovf_cnt),
    .hi_used   (hi_used)
  );
  assign fl_layer = fl_cur;

  // A partial output stored with the layer FL is brought back to the product FL.
  always_comb begin
    init_sh   = {c.fl_prod[FL_W-1], c.fl_prod} - {fl_cur[FL_W-1], fl_cur};
    psum_init = '0;
    if (c.psum_in) begin
      if (init_sh >= 0) psum_init = acc_t'(out_mem[OAW'(p_addr)]) <<< init_sh;
      else              psum_init = acc_t'(out_mem[OAW'(p_addr)]) >>> (-init_sh);
    end
  end

  data_t post_val;
  always_comb begin
    post_val = q;
    if (relu_en && q < 0) post_val = '0;
  end

  assign mon_start = start && state == S_IDLE;
  assign mon_valid = state == S_POST;
  assign mon_end   = state == S_END && c.final_out;

  logic first_grp, last_grp;
  assign first_grp = ci == '0 && ky == '0 && kg == '0;
  assign last_grp  = ci == c.cin - 1'b1 && ky == c.kh - 1'b1 && kg == ngrp - 1'b1;

  assign busy = state != S_IDLE;
  assign out_rdata = out_mem[out_addr];

  always_ff @(posedge clk) begin
    if (in_we) in_mem[in_addr] <= in_wdata;
    if (w_we)  w_mem[w_addr]   <= w_wdata;
    if (state == S_POST && (!pool_en || sub == 2'd3)) begin
      out_mem[OAW'(o_addr)] <= (pool_en && sub != 2'd0 && pmax > post_val) ? pmax : post_val;
    end else if (out_we) begin
      out_mem[out_addr] <= out_wdata;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state      <= S_IDLE;
      done       <= 1'b0;
      c          <= '0;
      ow <= '0; oh <= '0; pw <= '0; ph <= '0;
      pool_en    <= 1'b0;
      relu_en    <= 1'b0;
      ssh_q      <= '0;
      co <= '0; ci <= '0; px <= '0; py <= '0; sub <= '0; ky <= '0; kg <= '0;
      ngrp       <= '0;
      acc        <= '0;
      pmax       <= '0;
      mac_cycles <= '0;
      lane_ops   <= '0;
    end else begin
      done <= 1'b0;
      unique case (state)
        S_IDLE: if (start) begin
          logic [9:0] w_o, h_o;
          w_o = ((cfg.in_w - 10'(cfg.kw)) >> sshift) + 1'b1;
          h_o = ((cfg.in_h - 10'(cfg.kh)) >> sshift) + 1'b1;
          c       <= cfg;
          ssh_q   <= sshift;
          ow      <= w_o;
          oh      <= h_o;
          pool_en <= cfg.pool && cfg.final_out;
          relu_en <= cfg.relu && cfg.final_out;
          pw      <= (cfg.pool && cfg.final_out) ? w_o >> 1 : w_o;
          ph      <= (cfg.pool && cfg.final_out) ? h_o >> 1 : h_o;
          ngrp    <= 5'((6'(cfg.kw) + 6'd2) / 6'd3);
          co <= '0; ci <= '0; px <= '0; py <= '0; sub <= '0; ky <= '0; kg <= '0;
          mac_cycles <= '0;
          lane_ops   <= '0;
          state   <= S_MAC;
        end
        S_MAC: begin
          acc        <= (first_grp ? psum_init : acc) + prod_sum;
          mac_cycles <= mac_cycles + 1;
          lane_ops   <= lane_ops + 32'(nlanes);
          if (kg == ngrp - 1'b1) begin
            kg <= '0;
            if (ky == c.kh - 1'b1) begin
              ky <= '0;
              if (ci == c.cin - 1'b1) ci <= '0;
              else                    ci <= ci + 1'b1;
            end else ky <= ky + 1'b1;
          end else kg <= kg + 1'b1;
          if (last_grp) state <= S_POST;
        end
        S_POST: begin
          pmax  <= (sub == 2'd0 || post_val > pmax) ? post_val : pmax;
          state <= S_MAC;
          if (pool_en && sub != 2'd3) begin
            sub <= sub + 1'b1;
          end else begin
            sub <= '0;
            if (px == pw - 1'b1) begin
              px <= '0;
              if (py == ph - 1'b1) begin
                py <= '0;
                if (co == c.cout - 1'b1) state <= S_END;
                else                     co <= co + 1'b1;
              end else py <= py + 1'b1;
            end else px <= px + 1'b1;
          end
        end
        S_END: begin
          done  <= 1'b1;
          state <= S_IDLE;
        end
        default: state <= S_IDLE;
      endcase
    end
  end

  // The engine supports strides 1, 2 and 4 only.
  assert property (@(posedge clk) disable iff (!rst_n)
                   start && state == S_IDLE |-> cfg.stride inside {3'd1, 3'd2, 3'd4});

endmodule
