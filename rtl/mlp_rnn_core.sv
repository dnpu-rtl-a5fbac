// mlp_rnn_core: MLP-RNN processor, a matrix-vector engine with LUT-based multiplication.
//
// It computes o_m = sum_n W_nm * i_n for a fully-connected or recurrent layer. A bias is
// handled as one more weight row: the host stores a constant 1 (in the input FL) as an
// element of the input vector, so [1 i_0 .. i_n] x [b; W] needs no extra hardware.
//
// Weights are 4-bit indices into a 16-entry codebook of 16-bit values. The input vector
// is consumed eight elements at a time. For each group of eight inputs the eight
// Q-tables are built in parallel (16 cycles, one shared multiplier per table); then one
// 8x8 block of weight indices is read per cycle: eight output lanes each look up their
// eight products in the eight tables, add them in an adder tree and add the sum to the
// lane's accumulator in the accumulator buffer. A layer with N inputs and M outputs takes
// ceil(N/8) * (18 + ceil(M/8)) + M + 2 cycles from start to done.
// Finally every accumulator is rounded (right shift by cfg.shift, round half up),
// saturated to 16 bits, passed through the activation unit and written to the data
// buffer at out_base, where it can serve as the next layer's or time step's input.
// A layer with more inputs than the buffers hold is run as several passes over slices
// of the input vector; with cfg.acc_keep set a pass continues the accumulators of the
// previous one instead of clearing them, and the outputs of the last pass are final.
//
// Element-wise operations (cfg.op != OP_MATVEC) work on two vectors a (at in_base) and b
// (at w_base, here a data-buffer address) of n_out elements: product with rounding shift,
// saturating sum, or activation only, each followed by the activation function. NQ
// element lanes handle NQ elements per cycle (ceil(n_out/NQ) + 2 cycles), which gives the
// gate products and sums of LSTM cells, e.g. c = f*c + i*g and h = o*tanh(c).
// The output may be written in place or below an input vector, not inside one above its
// base (a later step would read an already overwritten element).
//
// Weight-index word layout (NQ*NQ*QB bits): lane m, table k at bits [(m*NQ+k)*QB +: QB];
// the word for input group g and output group h is at w_base + g*ceil(M/8) + h.
// From the design description: eight Q-tables, eight adder trees with accumulators,
// 16-bit weights quantized to 4-bit indices, an 8 KB data buffer, ReLU/sigmoid/tanh,
// element-wise multipliers and vector adders.
// This design's choices: buffer sizes other than the data buffer, the word layout,
// building a table in 16 cycles, no overlap of table building with lookups, and how the
// element-wise operations are encoded.
//
// Interface: pulse start with cfg valid; busy until the done pulse. Host ports write the
// data buffer (and read it at d_addr), the weight-index buffer and the codebook; they
// must not be used while busy.
module mlp_rnn_core
  import dnpu_pkg::*;
#(
  parameter int NQ         = 8,     // Q-tables = inputs per group = output lanes
  parameter int QB         = 4,     // weight index bits
  parameter int DATA_DEPTH = 4096,  // data buffer words (8 KB of 16-bit words)
  parameter int W_DEPTH    = 512,   // weight-index words (NQ*NQ*QB bits each, 16 KB)
  parameter int ACC_DEPTH  = 1024,  // accumulators (max outputs per layer)
  localparam int NE  = 2 ** QB,
  localparam int WW  = NQ * NQ * QB,
  localparam int DAW = $clog2(DATA_DEPTH),
  localparam int WAW = $clog2(W_DEPTH),
  localparam int CAW = $clog2(ACC_DEPTH)
) (
  input  logic            clk,
  input  logic            rst_n,
  input  logic            start,
  input  mlp_cfg_t        cfg,
  output logic            busy,
  output logic            done,
  // host access
  input  logic            d_we,
  input  logic [DAW-1:0]  d_addr,
  input  data_t           d_wdata,
  output data_t           d_rdata,
  input  logic            w_we,
  input  logic [WAW-1:0]  w_addr,
  input  logic [WW-1:0]   w_wdata,
  input  logic            cb_we,
  input  logic [QB-1:0]   cb_idx,
  input  data_t           cb_wdata,
  // statistics
  output logic [31:0]     qt_builds,   // Q-table build rounds
  output logic [31:0]     lut_mults,   // products obtained by table lookup
  output logic [31:0]     elem_ops     // element-wise results written
);

  localparam int TREE_W = 2 * DATA_W + $clog2(NQ);

  typedef enum logic [2:0] {S_IDLE, S_LOAD, S_BUILD, S_ROW, S_OUT, S_ELEM, S_END} state_e;
  state_e state;

  data_t            d_mem  [DATA_DEPTH];
  logic [WW-1:0]    w_mem  [W_DEPTH];
  acc_t             a_mem  [ACC_DEPTH];
  data_t            cb     [NE];

  mlp_cfg_t   c;
  logic [11:0] g, h, o;
  logic [11:0] e;          // first element of the current element-wise step
  logic [11:0] ngrp_in, ngrp_out;

  // ---------------- Q-tables ----------------
  logic                        qt_build;
  data_t                       qt_x    [NQ];
  logic                        qt_rdy  [NQ];
  logic [QB-1:0]               qt_idx  [NQ][NQ];  // [table][lane]
  logic signed [2*DATA_W-1:0]  qt_val  [NQ][NQ];  // [table][lane]
  logic [WW-1:0]               w_word;
  logic                        all_rdy;

  assign w_word = w_mem[WAW'(c.w_base + g * ngrp_out + h)];

  for (genvar k = 0; k < NQ; k++) begin : g_qt
    always_comb begin
      logic [11:0] n;
      n = 12'(g * NQ + k);
      qt_x[k] = n < c.n_in ? d_mem[DAW'(c.in_base + n)] : '0;
      for (int m = 0; m < NQ; m++) qt_idx[k][m] = w_word[(m*NQ+k)*QB +: QB];
    end
    qtable #(.QB(QB), .NR(NQ)) u_qt (
      .clk, .rst_n,
      .build (qt_build),
      .x     (qt_x[k]),
      .cb    (cb),
      .ready (qt_rdy[k]),
      .idx   (qt_idx[k]),
      .val   (qt_val[k])
    );
  end

  always_comb begin
    all_rdy = 1'b1;
    for (int k = 0; k < NQ; k++) all_rdy &= qt_rdy[k];
  end

  // ---------------- adder trees (one per output lane) ----------------
  logic signed [TREE_W-1:0] lane_sum [NQ];
  always_comb begin
    for (int m = 0; m < NQ; m++) begin
      lane_sum[m] = '0;
      for (int k = 0; k < NQ; k++) lane_sum[m] += TREE_W'(qt_val[k][m]);
    end
  end

  // ---------------- output stage ----------------
  acc_t               acc_o, rnd;
  data_t              sat, act_y;
  always_comb begin
    acc_o = a_mem[CAW'(o)];
    rnd   = c.shift == '0 ? acc_o : (acc_o + (acc_t'(1) <<< (c.shift - 1'b1))) >>> c.shift;
    if (rnd > acc_t'(32767))       sat = 16'sh7fff;
    else if (rnd < acc_t'(-32768)) sat = 16'sh8000;
    else                           sat = data_t'(rnd);
  end

  act_unit u_act (.act(c.act), .fl(c.act_fl), .x(sat), .y(act_y));

  // ---------------- element-wise lanes ----------------
  data_t el_y   [NQ];
  logic  el_vld [NQ];
  for (genvar l = 0; l < NQ; l++) begin : g_el
    logic [11:0]              n;
    data_t                    a, b, r16;
    logic signed [2*DATA_W:0] r;
    always_comb begin
      n = e + 12'(l);
      el_vld[l] = n < c.n_out;
      a = d_mem[DAW'(c.in_base + n)];
      b = d_mem[DAW'(c.w_base + n)];
      unique case (c.op)
        OP_EMUL: r = c.shift == '0 ? (2*DATA_W+1)'(a * b)
                     : ((2*DATA_W+1)'(a * b) + ((2*DATA_W+1)'(1) <<< (c.shift - 1'b1))) >>> c.shift;
        OP_EADD: r = (2*DATA_W+1)'(a) + (2*DATA_W+1)'(b);
        default: r = (2*DATA_W+1)'(a);
      endcase
      if (r > (2*DATA_W+1)'(32767))       r16 = 16'sh7fff;
      else if (r < -(2*DATA_W+1)'(32768)) r16 = 16'sh8000;
      else                                r16 = data_t'(r);
    end
    act_unit u_act_el (.act(c.act), .fl(c.act_fl), .x(r16), .y(el_y[l]));
  end

  assign qt_build = state == S_LOAD;
  assign busy     = state != S_IDLE;
  assign d_rdata  = d_mem[d_addr];

  // ---------------- buffers ----------------
  always_ff @(posedge clk) begin
    if (state == S_OUT) d_mem[DAW'(c.out_base + o)] <= act_y;
    else if (state == S_ELEM) begin
      for (int l = 0; l < NQ; l++)
        if (el_vld[l]) d_mem[DAW'(c.out_base + e + 12'(l))] <= el_y[l];
    end else if (d_we)  d_mem[d_addr] <= d_wdata;
    if (w_we)            w_mem[w_addr] <= w_wdata;
    if (cb_we)           cb[cb_idx]    <= cb_wdata;
    if (state == S_ROW) begin
      for (int m = 0; m < NQ; m++) begin
        if (12'(h * NQ) + 12'(m) < c.n_out)
          a_mem[CAW'(h * NQ + 12'(m))] <= (g == '0 && !c.acc_keep ? acc_t'(0) : a_mem[CAW'(h * NQ + 12'(m))])
                                          + acc_t'(lane_sum[m]);
      end
    end
  end

  // ---------------- control ----------------
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state     <= S_IDLE;
      done      <= 1'b0;
      c         <= '0;
      g <= '0; h <= '0; o <= '0; e <= '0;
      elem_ops  <= '0;
      ngrp_in   <= '0;
      ngrp_out  <= '0;
      qt_builds <= '0;
      lut_mults <= '0;
    end else begin
      done <= 1'b0;
      unique case (state)
        S_IDLE: if (start) begin
          c        <= cfg;
          ngrp_in  <= (cfg.n_in  + 12'(NQ - 1)) / 12'(NQ);
          ngrp_out <= (cfg.n_out + 12'(NQ - 1)) / 12'(NQ);
          g <= '0; h <= '0; o <= '0; e <= '0;
          state    <= cfg.op == OP_MATVEC ? S_LOAD : S_ELEM;
        end
        S_LOAD: begin
          qt_builds <= qt_builds + 1;
          state     <= S_BUILD;
        end
        S_BUILD: if (all_rdy) state <= S_ROW;
        S_ROW: begin
          lut_mults <= lut_mults + 32'(NQ * NQ);
          if (h == ngrp_out - 1'b1) begin
            h <= '0;
            if (g == ngrp_in - 1'b1) state <= S_OUT;
            else begin
              g     <= g + 1'b1;
              state <= S_LOAD;
            end
          end else h <= h + 1'b1;
        end
        S_OUT: begin
          if (o == c.n_out - 1'b1) state <= S_END;
          o <= o + 1'b1;
        end
        S_ELEM: begin
          // valid lanes are a prefix, so the highest valid lane gives the count
          for (int l = 0; l < NQ; l++) if (el_vld[l]) elem_ops <= elem_ops + 32'(l + 1);
          if (e + 12'(NQ) >= c.n_out) state <= S_END;
          e <= e + 12'(NQ);
        end
        S_END: begin
          done  <= 1'b1;
          state <= S_IDLE;
        end
        default: state <= S_IDLE;
      endcase
    end
  end

endmodule
