// tb_dnpu_top: end-to-end run of the whole processor at its default sizes.
//   1. A QVGA stereo pair (320x240, two depth regions at disparities 10 and 37) is
//      matched over 64 levels; the depth map is compared with a model that uses a
//      conventional single-corner integral image, and region interiors must show their
//      true disparity.
//   2. RGB-D: three colour channels are written by the host and a 10x10 tile of the
//      depth map is moved into the fourth input channel by the transfer engine.
//   3. Convolution layers on that tile: 3x3 with ReLU and 2x2 pooling, 1x1 stride 2,
//      4x4 stride 4, and a pooled 3x3 layer as two channel groups (partial-output
//      pass). Every output word is checked against a model; the layer FL must adapt.
//   4. The last convolution output (CNN features) is moved into the MLP-RNN data
//      buffer behind a constant-1 bias input, and fully-connected layers with tanh and
//      ReLU are run through the Q-tables and checked. Between them, the tanh outputs
//      are gated by a host-written vector with the element-wise product (h = o*tanh).
// Each mechanism (winner updates, both transfers, pooling, ReLU clipping, strides 2 and
// 4, partial-output pass, FL adaptation, saturation, Q-table building, tanh, element-
// wise gating) is
// counted; one that never happens is a failure.
module tb_dnpu_top;
  import dnpu_pkg::*;
  localparam int SW = 320, SH = 240, ND = 64, WR = 3;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic conv_start = 0, conv_busy, conv_done;
  conv_cfg_t conv_cfg = '0;
  logic conv_in_we = 0, conv_w_we = 0, conv_out_we = 0;
  logic [13:0] conv_in_addr = 0;
  logic [12:0] conv_w_addr = 0;
  logic [11:0] conv_out_addr = 0;
  data_t conv_in_wdata = 0, conv_w_wdata = 0, conv_out_wdata = 0, conv_out_rdata;
  logic conv_fl_wr_en = 0;
  logic [3:0] conv_fl_wr_layer = 0;
  fl_t conv_fl_wr_val = 0, conv_fl_layer;
  logic [4:0] conv_fl_wr_wl = 16, conv_wl_layer;
  logic [31:0] conv_mac_cycles, conv_lane_ops, conv_ovf_cnt;
  logic mlp_start = 0, mlp_busy, mlp_done;
  mlp_cfg_t mlp_cfg = '0;
  logic mlp_d_we = 0, mlp_w_we = 0, mlp_cb_we = 0;
  logic [11:0] mlp_d_addr = 0;
  logic [8:0] mlp_w_addr = 0;
  data_t mlp_d_wdata = 0, mlp_d_rdata, mlp_cb_wdata = 0;
  logic [255:0] mlp_w_wdata = 0;
  logic [3:0] mlp_cb_idx = 0;
  logic [31:0] mlp_qt_builds, mlp_lut_mults, mlp_elem_ops;
  logic sm_start = 0, sm_busy, sm_done, sm_l_we = 0, sm_r_we = 0;
  logic [16:0] sm_pix_addr = 0, sm_dm_addr = 0;
  logic [7:0] sm_pix_wdata = 0;
  logic [5:0] sm_dm_rdata;
  logic [31:0] sm_updates;
  logic xfer_start = 0, xfer_busy, xfer_done;
  xfer_cfg_t xfer_cfg = '0;

  dnpu_top dut (.*);

  int checks = 0, failures = 0;
  int n_win = 0, n_xf_depth = 0, n_xf_feat = 0, n_pool = 0, n_relu_clip = 0, n_stride2 = 0,
      n_stride4 = 0, n_psum = 0, n_fl_adapt = 0, n_sat = 0, n_qt = 0, n_tanh = 0,
      n_elem = 0;

  initial begin
    repeat (30_000_000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic expect_eq(input longint got, input longint want, input string what);
    checks++;
    if (got != want) begin
      failures++;
      if (failures < 15) $display("%s: got %0d expected %0d", what, got, want);
    end
  endtask

  // ------------------------------------------------------------------ stereo
  byte unsigned L [SH][SW];
  byte unsigned R [SH][SW];
  int depth [SH][SW];

  task automatic stereo_model();
    int best [SH][SW];
    longint P [SH+1][SW+1];
    for (int d = 0; d < ND; d++) begin
      for (int y = 0; y <= SH; y++) P[y][0] = 0;
      for (int x = 0; x <= SW; x++) P[0][x] = 0;
      for (int y = 0; y < SH; y++)
        for (int x = 0; x < SW; x++) begin
          int c;
          c = x < d ? 255 : (L[y][x] > R[y][x-d] ? L[y][x] - R[y][x-d] : R[y][x-d] - L[y][x]);
          P[y+1][x+1] = c + P[y][x+1] + P[y+1][x] - P[y][x];
        end
      for (int y = 0; y < SH; y++)
        for (int x = 0; x < SW; x++) begin
          int x0, x1, y0, y1, s;
          x0 = x - WR < 0 ? 0 : x - WR;  x1 = x + WR > SW - 1 ? SW - 1 : x + WR;
          y0 = y - WR < 0 ? 0 : y - WR;  y1 = y + WR > SH - 1 ? SH - 1 : y + WR;
          s = int'(P[y1+1][x1+1] - P[y0][x1+1] - P[y1+1][x0] + P[y0][x0]);
          if (d == 0 || s < best[y][x]) begin best[y][x] = s; depth[y][x] = d; end
        end
    end
  endtask

  // ------------------------------------------------------------------ convolution model
  int m_in [4096];   // input tensor of the current pass
  int m_w  [4096];
  int m_out[4096];
  int fl_out_cur;

  function automatic int quant(input longint acc, input int sh, inout int sat);
    longint r;
    r = sh > 0 ? (acc + (64'sd1 <<< (sh - 1))) >>> sh : acc <<< (-sh);
    if (r > 32767) begin r = 32767; sat++; end
    if (r < -32768) begin r = -32768; sat++; end
    return int'(r);
  endfunction

  task automatic conv_model(input int W, input int H, input int cin, input int cout,
                            input int kw, input int kh, input int s, input bit relu,
                            input bit pool, input bit psum, input bit fin, input int flp,
                            input int flo, output int nout);
    int ow, oh, pw, ph, sat;
    int res [4096];
    sat = 0;
    ow = (W - kw) / s + 1; oh = (H - kh) / s + 1;
    pw = (pool && fin) ? ow / 2 : ow; ph = (pool && fin) ? oh / 2 : oh;
    for (int co = 0; co < cout; co++)
      for (int py = 0; py < ph; py++)
        for (int px = 0; px < pw; px++) begin
          int best;
          for (int sub = 0; sub < ((pool && fin) ? 4 : 1); sub++) begin
            int oy, ox, v;
            longint acc;
            oy = (pool && fin) ? 2 * py + sub / 2 : py;
            ox = (pool && fin) ? 2 * px + sub % 2 : px;
            acc = psum ? (longint'(m_out[co * oh * ow + oy * ow + ox]) <<< (flp - flo)) : 0;
            for (int ci = 0; ci < cin; ci++)
              for (int ky = 0; ky < kh; ky++)
                for (int kx = 0; kx < kw; kx++)
                  acc += longint'(m_in[ci * H * W + (oy * s + ky) * W + ox * s + kx]) *
                         longint'(m_w[((co * cin + ci) * kh + ky) * kw + kx]);
            v = quant(acc, flp - flo, sat);
            if (relu && fin && v < 0) begin v = 0; n_relu_clip++; end
            if (sub == 0 || v > best) best = v;
          end
          res[co * ph * pw + py * pw + px] = best;
        end
    nout = cout * ph * pw;
    for (int i = 0; i < nout; i++) m_out[i] = res[i];
    if (sat > 0) n_sat++;
  endtask

  task automatic conv_write_in(input int addr, input int v);
    @(negedge clk); conv_in_we = 1; conv_in_addr = 14'(addr); conv_in_wdata = data_t'(v);
    @(negedge clk); conv_in_we = 0;
  endtask

  task automatic conv_load_w(input int n, input int rng);
    for (int i = 0; i < n; i++) begin
      m_w[i] = int'($urandom % (2 * rng + 1)) - rng;
      @(negedge clk); conv_w_we = 1; conv_w_addr = 13'(i); conv_w_wdata = data_t'(m_w[i]);
    end
    @(negedge clk); conv_w_we = 0;
  endtask

  // copy a depth tile into input channel slot `slot` of a 10x10 tile
  task automatic depth_to_conv(input int x0, input int y0, input int slot);
    @(negedge clk);
    xfer_cfg = '0;
    xfer_cfg.mode = XF_DEPTH_TO_CONV; xfer_cfg.x0 = 9'(x0); xfer_cfg.y0 = 8'(y0);
    xfer_cfg.dst_base = 16'(slot * 100); xfer_cfg.tw = 10'd10; xfer_cfg.th = 10'd10;
    xfer_start = 1;
    @(negedge clk); xfer_start = 0;
    while (!xfer_done) @(negedge clk);
    for (int i = 0; i < 100; i++) m_in[slot * 100 + i] = depth[y0 + i / 10][x0 + i % 10];
    n_xf_depth++;
  endtask

  task automatic conv_run(input string name, input int cin, input int cout, input int k,
                          input int s, input bit relu, input bit pool, input bit psum,
                          input bit fin);
    int nout, fl_before;
    fl_before = int'(conv_fl_layer);
    conv_cfg = '0;
    conv_cfg.in_w = 10'd10; conv_cfg.in_h = 10'd10; conv_cfg.cin = 11'(cin);
    conv_cfg.cout = 11'(cout); conv_cfg.kw = 5'(k); conv_cfg.kh = 5'(k);
    conv_cfg.stride = 3'(s); conv_cfg.relu = relu; conv_cfg.pool = pool;
    conv_cfg.psum_in = psum; conv_cfg.final_out = fin; conv_cfg.layer = 4'd2;
    conv_cfg.fl_prod = fl_t'(8);
    #1 fl_before = int'(conv_fl_layer);
    @(negedge clk); conv_start = 1;
    @(negedge clk); conv_start = 0;
    while (!conv_done) @(negedge clk);
    conv_model(10, 10, cin, cout, k, k, s, relu, pool, psum, fin, 8, fl_before, nout);
    for (int i = 0; i < nout; i++) begin
      conv_out_addr = 12'(i); #1;
      expect_eq(int'(conv_out_rdata), m_out[i], $sformatf("%s out[%0d]", name, i));
    end
    @(negedge clk);
    if (int'(conv_fl_layer) != fl_before) n_fl_adapt++;
    if (pool && fin) n_pool++;
    if (s == 2) n_stride2++;
    if (s == 4) n_stride4++;
    if (psum) n_psum++;
    $display("conv %s: %0d outputs, FL %0d -> %0d, %0d saturations", name, nout, fl_before,
             conv_fl_layer, conv_ovf_cnt);
  endtask

  // ------------------------------------------------------------------ MLP model
  int m_cb [16];
  int m_x  [256];
  int m_idx[256][16];

  task automatic mlp_run(input string name, input int n, input int m, input act_e act);
    int hg;
    hg = (m + 7) / 8;
    for (int g = 0; g < (n + 7) / 8; g++)
      for (int h = 0; h < hg; h++) begin
        logic [255:0] word;
        for (int mm = 0; mm < 8; mm++)
          for (int k = 0; k < 8; k++) begin
            logic [3:0] ix;
            ix = 4'($urandom);
            word[(mm * 8 + k) * 4 +: 4] = ix;
            if (h * 8 + mm < 16) m_idx[g * 8 + k][h * 8 + mm] = int'(ix);
          end
        @(negedge clk); mlp_w_we = 1; mlp_w_addr = 9'(g * hg + h); mlp_w_wdata = word;
      end
    @(negedge clk); mlp_w_we = 0;
    mlp_cfg = '0;
    mlp_cfg.n_in = 12'(n); mlp_cfg.n_out = 12'(m); mlp_cfg.in_base = 12'd0;
    mlp_cfg.out_base = 12'd2000; mlp_cfg.w_base = 12'd0; mlp_cfg.shift = 5'd10;
    mlp_cfg.act = act; mlp_cfg.act_fl = 4'd10;
    @(negedge clk); mlp_start = 1;
    @(negedge clk); mlp_start = 0;
    while (!mlp_done) @(negedge clk);
    for (int o = 0; o < m; o++) begin
      longint acc, r;
      real xr, yr, want;
      acc = 0;
      for (int i = 0; i < n; i++) acc += longint'(m_x[i]) * longint'(m_cb[m_idx[i][o]]);
      r = (acc + (64'sd1 <<< 9)) >>> 10;
      if (r > 32767) r = 32767;
      if (r < -32768) r = -32768;
      mlp_d_addr = 12'(2000 + o); #1;
      if (act == ACT_TANH) begin
        xr = real'(r) / 1024.0; yr = real'(mlp_d_rdata) / 1024.0;
        want = (1.0 - $exp(-2.0 * xr)) / (1.0 + $exp(-2.0 * xr));
        checks++;
        if (yr - want > 0.045 || want - yr > 0.045) begin
          failures++;
          $display("%s o[%0d]: %f expected %f", name, o, yr, want);
        end
        if (r > -3000 && r < 3000) n_tanh++;
      end else begin
        expect_eq(int'(mlp_d_rdata), r < 0 ? 0 : r, $sformatf("%s o[%0d]", name, o));
      end
    end
    $display("mlp %s: %0d x %0d, %0d Q-table builds so far", name, n, m, mlp_qt_builds);
  endtask

  // ------------------------------------------------------------------ scenario
  initial begin
    int x0, y0, nfeat;
    repeat (3) @(posedge clk);
    rst_n = 1;

    // ---- 1. stereo matching ----
    for (int y = 0; y < SH; y++)
      for (int x = 0; x < SW; x++) L[y][x] = 8'($urandom);
    for (int y = 0; y < SH; y++)
      for (int x = 0; x < SW; x++) begin
        int t;
        t = x < SW / 2 ? 10 : 37;
        R[y][x] = x + t < SW ? L[y][x + t] : 8'($urandom);
      end
    for (int i = 0; i < SW * SH; i++) begin
      @(negedge clk); sm_l_we = 1; sm_r_we = 0; sm_pix_addr = 17'(i);
      sm_pix_wdata = L[i / SW][i % SW];
      @(negedge clk); sm_l_we = 0; sm_r_we = 1; sm_pix_wdata = R[i / SW][i % SW];
    end
    @(negedge clk); sm_r_we = 0;
    @(negedge clk); sm_start = 1;
    @(negedge clk); sm_start = 0;
    stereo_model();
    while (!sm_done) @(negedge clk);
    n_win = int'(sm_updates);
    for (int y = 0; y < SH; y++)
      for (int x = 0; x < SW; x++) begin
        sm_dm_addr = 17'(y * SW + x); #1;
        expect_eq(int'(sm_dm_rdata), depth[y][x], $sformatf("depth(%0d,%0d)", x, y));
        if ((x >= 50 && x < 140) || (x >= 220 && x < 300))
          expect_eq(int'(sm_dm_rdata), x < SW / 2 ? 10 : 37, $sformatf("true depth(%0d,%0d)", x, y));
      end
    $display("stereo: %0d winner updates, depth(100,100)=%0d depth(250,100)=%0d", n_win,
             depth[100][100], depth[100][250]);

    // ---- 2. RGB-D input tile: R, G, B from the host, depth from the stereo processor ----
    x0 = 155; y0 = 100;   // tile straddles the two depth regions
    @(negedge clk); conv_fl_wr_en = 1; conv_fl_wr_layer = 4'd2; conv_fl_wr_val = fl_t'(10);
    @(negedge clk); conv_fl_wr_en = 0;
    for (int i = 0; i < 300; i++) begin
      m_in[i] = int'($urandom % 256);
      conv_write_in(i, m_in[i]);
    end
    depth_to_conv(x0, y0, 3);

    // ---- 3. convolution layers ----
    conv_load_w(2 * 4 * 9, 40);
    conv_run("k3s1_relu_pool", 4, 2, 3, 1, 1, 1, 0, 1);   // FL 10 is too large: saturates
    @(negedge clk); conv_fl_wr_en = 1; conv_fl_wr_val = fl_t'(2);
    @(negedge clk); conv_fl_wr_en = 0;
    conv_load_w(3 * 4 * 1, 40);
    conv_run("k1s2", 4, 3, 1, 2, 0, 0, 0, 1);
    conv_load_w(2 * 4 * 16, 40);
    conv_run("k4s4", 4, 2, 4, 4, 1, 0, 0, 1);
    // channel division of a 4-channel 3x3 layer: channels 0-1, then 2-3 at slots 0-1
    begin
      int keep_in [400];
      int w_full [72];
      for (int i = 0; i < 400; i++) keep_in[i] = m_in[i];
      for (int i = 0; i < 72; i++) w_full[i] = int'($urandom % 81) - 40;
      for (int half = 0; half < 2; half++) begin
        if (half == 1) begin
          for (int i = 0; i < 100; i++) begin
            m_in[i] = keep_in[200 + i];
            conv_write_in(i, m_in[i]);
          end
          depth_to_conv(x0, y0, 1);
        end
        for (int co = 0; co < 2; co++)
          for (int ci = 0; ci < 2; ci++)
            for (int t = 0; t < 9; t++) begin
              int a;
              a = (co * 2 + ci) * 9 + t;
              m_w[a] = w_full[(co * 4 + half * 2 + ci) * 9 + t];
              @(negedge clk); conv_w_we = 1; conv_w_addr = 13'(a); conv_w_wdata = data_t'(m_w[a]);
            end
        @(negedge clk); conv_w_we = 0;
        conv_run(half == 0 ? "chdiv_pass1" : "chdiv_pass2_pool", 2, 2, 3, 1, 1, half, half, half);
      end
    end
    nfeat = 2 * 4 * 4;

    // ---- 4. CNN features into the MLP-RNN processor ----
    @(negedge clk); mlp_d_we = 1; mlp_d_addr = 12'd0; mlp_d_wdata = data_t'(1 << 6);
    @(negedge clk); mlp_d_we = 0;
    m_x[0] = 1 << 6;
    xfer_cfg = '0;
    xfer_cfg.mode = XF_CONV_TO_MLP; xfer_cfg.src_base = 16'd0; xfer_cfg.dst_base = 16'd1;
    xfer_cfg.tw = 10'(nfeat); xfer_cfg.th = 10'd1;
    @(negedge clk); xfer_start = 1;
    @(negedge clk); xfer_start = 0;
    while (!xfer_done) @(negedge clk);
    for (int i = 0; i < nfeat; i++) m_x[1 + i] = m_out[i];
    for (int i = 0; i <= nfeat; i++) begin
      mlp_d_addr = 12'(i); #1;
      expect_eq(int'(mlp_d_rdata), m_x[i], $sformatf("feature[%0d]", i));
    end
    n_xf_feat++;
    for (int k = 0; k < 16; k++) begin
      m_cb[k] = int'($urandom % 61) - 30;
      @(negedge clk); mlp_cb_we = 1; mlp_cb_idx = 4'(k); mlp_cb_wdata = data_t'(m_cb[k]);
    end
    @(negedge clk); mlp_cb_we = 0;
    mlp_run("fc_tanh", nfeat + 1, 12, ACT_TANH);
    // output gate: h[k] = o[k] * tanh_out[k], o in [0, 1] at FL 10
    begin
      int o_g [12];
      for (int k = 0; k < 12; k++) begin
        o_g[k] = int'($urandom % 1025);
        @(negedge clk); mlp_d_we = 1; mlp_d_addr = 12'(2100 + k); mlp_d_wdata = data_t'(o_g[k]);
      end
      @(negedge clk); mlp_d_we = 0;
      mlp_cfg = '0;
      mlp_cfg.op = OP_EMUL; mlp_cfg.n_out = 12'd12; mlp_cfg.in_base = 12'd2000;
      mlp_cfg.w_base = 12'd2100; mlp_cfg.out_base = 12'd2200; mlp_cfg.shift = 5'd10;
      @(negedge clk); mlp_start = 1;
      @(negedge clk); mlp_start = 0;
      while (!mlp_done) @(negedge clk);
      for (int k = 0; k < 12; k++) begin
        longint t, want;
        mlp_d_addr = 12'(2000 + k); #1;
        t = longint'(mlp_d_rdata);
        want = (t * longint'(o_g[k]) + 512) >>> 10;
        mlp_d_addr = 12'(2200 + k); #1;
        expect_eq(longint'(mlp_d_rdata), want, $sformatf("gate h[%0d]", k));
      end
      n_elem = int'(mlp_elem_ops);
      expect_eq(n_elem, 12, "element-wise count");
    end
    mlp_run("fc_relu", nfeat + 1, 16, ACT_RELU);
    n_qt = int'(mlp_qt_builds);

    // ---- mechanism coverage ----
    $display("winner updates %0d, depth transfers %0d, feature transfers %0d, pooling %0d, ReLU clips %0d",
             n_win, n_xf_depth, n_xf_feat, n_pool, n_relu_clip);
    $display("stride-2 %0d, stride-4 %0d, partial passes %0d, FL adaptations %0d, saturating layers %0d",
             n_stride2, n_stride4, n_psum, n_fl_adapt, n_sat);
    $display("Q-table builds %0d, tanh outputs in the sloped range %0d, element-wise %0d",
             n_qt, n_tanh, n_elem);
    checks++; if (n_win == 0)       begin failures++; $display("no winner updates"); end
    checks++; if (n_xf_depth == 0)  begin failures++; $display("no depth transfer"); end
    checks++; if (n_xf_feat == 0)   begin failures++; $display("no feature transfer"); end
    checks++; if (n_pool == 0)      begin failures++; $display("no pooling"); end
    checks++; if (n_relu_clip == 0) begin failures++; $display("no ReLU clipping"); end
    checks++; if (n_stride2 == 0)   begin failures++; $display("no stride 2"); end
    checks++; if (n_stride4 == 0)   begin failures++; $display("no stride 4"); end
    checks++; if (n_psum == 0)      begin failures++; $display("no partial pass"); end
    checks++; if (n_fl_adapt == 0)  begin failures++; $display("no FL adaptation"); end
    checks++; if (n_sat == 0)       begin failures++; $display("no saturation"); end
    checks++; if (n_qt == 0)        begin failures++; $display("no Q-table build"); end
    checks++; if (n_tanh == 0)      begin failures++; $display("no tanh in sloped range"); end
    checks++; if (n_elem == 0)      begin failures++; $display("no element-wise operation"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
