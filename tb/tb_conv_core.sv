// tb_conv_core: convolution passes against a behavioural model written here.
// Cases: 3x3 stride 1 with ReLU and 2x2 pooling (all three multipliers busy), 1x1
// (one in three busy), 5x5 stride 2, 4x4 stride 4 with a 10-bit word length, and a
// pooled layer split into two channel groups with a partial-output pass. Each case checks every output word, the
// MAC-cycle and multiplier-operation counts, and the start-to-done cycle count
// (pixels * (cin*kh*ceil(kw/3) + 1) + 2).
module tb_conv_core;
  import dnpu_pkg::*;
  localparam int IND = 4096, WD = 2048, OD = 1024;

  logic clk = 0, rst_n = 0, start = 0, busy, done;
  conv_cfg_t cfg;
  logic in_we = 0, w_we = 0, out_we = 0;
  logic [11:0] in_addr = 0;
  logic [10:0] w_addr = 0;
  logic [9:0]  out_addr = 0;
  data_t in_wdata = 0, w_wdata = 0, out_wdata = 0, out_rdata;
  logic fl_wr_en = 0;
  logic [3:0] fl_wr_layer = 0;
  fl_t fl_wr_val = 0, fl_layer;
  logic [4:0] fl_wr_wl = 16, wl_layer;
  int m_wl = 16;
  logic [31:0] mac_cycles, lane_ops, ovf_cnt;
  int checks = 0, failures = 0;
  always #5 clk = ~clk;

  conv_core #(.IN_DEPTH(IND), .W_DEPTH(WD), .OUT_DEPTH(OD), .NLAYER(16)) dut (.*);

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // model memories
  int m_in [IND];
  int m_w  [WD];
  int m_out[OD];

  task automatic expect_eq(input longint got, input longint want, input string what);
    checks++;
    if (got != want) begin
      failures++;
      if (failures < 12) $display("%s: got %0d expected %0d", what, got, want);
    end
  endtask

  function automatic int quant(input longint acc, input int sh);
    longint r;
    r = sh > 0 ? (acc + (64'sd1 <<< (sh - 1))) >>> sh : acc <<< (-sh);
    if (r > (64'sd1 <<< (m_wl - 1)) - 1) r = (64'sd1 <<< (m_wl - 1)) - 1;
    if (r < -(64'sd1 <<< (m_wl - 1))) r = -(64'sd1 <<< (m_wl - 1));
    return int'(r);
  endfunction

  task automatic load(input int base_in, input int n_in, input int n_w, input int rng);
    for (int i = 0; i < n_in; i++) begin
      m_in[base_in + i] = int'($urandom % (2 * rng + 1)) - rng;
      @(negedge clk); in_we = 1; in_addr = 12'(base_in + i); in_wdata = data_t'(m_in[base_in + i]);
    end
    @(negedge clk); in_we = 0;
    for (int i = 0; i < n_w; i++) begin
      m_w[i] = int'($urandom % (2 * rng + 1)) - rng;
      @(negedge clk); w_we = 1; w_addr = 11'(i); w_wdata = data_t'(m_w[i]);
    end
    @(negedge clk); w_we = 0;
  endtask

  // model of one pass; ci0 = first input channel of the group in the model's tensor,
  // the hardware sees the group at input address 0
  task automatic model(input int W, input int H, input int cin, input int cout, input int kw,
                       input int kh, input int s, input bit relu, input bit pool,
                       input bit psum, input bit fin, input int flp, input int flo);
    int ow, oh, pw, ph;
    int res [OD];
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
            // partial outputs are stored unpooled
            acc = psum ? (longint'(m_out[co * oh * ow + oy * ow + ox]) <<< (flp - flo)) : 0;
            for (int ci = 0; ci < cin; ci++)
              for (int ky = 0; ky < kh; ky++)
                for (int kx = 0; kx < kw; kx++)
                  acc += longint'(m_in[ci * H * W + (oy * s + ky) * W + ox * s + kx]) *
                         longint'(m_w[((co * cin + ci) * kh + ky) * kw + kx]);
            v = quant(acc, flp - flo);
            if (relu && fin && v < 0) v = 0;
            if (sub == 0 || v > best) best = v;
          end
          res[co * ph * pw + py * pw + px] = best;
        end
    for (int i = 0; i < cout * ph * pw; i++) m_out[i] = res[i];
  endtask

  task automatic run(input string name, input int W, input int H, input int cin, input int cout,
                     input int kw, input int kh, input int s, input bit relu, input bit pool,
                     input bit psum, input bit fin, input int flp, input int flo);
    int ow, oh, npix, grp, cyc, nout;
    ow = (W - kw) / s + 1; oh = (H - kh) / s + 1;
    npix = cout * ow * oh;
    if (pool && fin) begin
      npix = cout * (ow / 2) * (oh / 2) * 4;
      nout = cout * (ow / 2) * (oh / 2);
    end else nout = npix;
    grp = (kw + 2) / 3;
    cfg = '0;
    cfg.in_w = 10'(W); cfg.in_h = 10'(H); cfg.cin = 11'(cin); cfg.cout = 11'(cout);
    cfg.kw = 5'(kw); cfg.kh = 5'(kh); cfg.stride = 3'(s); cfg.relu = relu; cfg.pool = pool;
    cfg.psum_in = psum; cfg.final_out = fin; cfg.layer = 4'd1; cfg.fl_prod = fl_t'(flp);
    @(negedge clk); start = 1;
    @(negedge clk); start = 0;
    cyc = 1;
    while (!done) begin @(negedge clk); cyc++; end
    model(W, H, cin, cout, kw, kh, s, relu, pool, psum, fin, flp, flo);
    expect_eq(cyc, npix * (cin * kh * grp + 1) + 2, {name, " cycles"});
    expect_eq(mac_cycles, npix * cin * kh * grp, {name, " mac cycles"});
    expect_eq(lane_ops, npix * cin * kh * kw, {name, " multiplier ops"});
    for (int i = 0; i < nout; i++) begin
      out_addr = 10'(i); #1;
      expect_eq(int'(out_rdata), m_out[i], $sformatf("%s out[%0d]", name, i));
    end
    $display("%s: %0d outputs, %0d cycles, multiplier utilisation %0d%%", name, nout, cyc,
             100 * lane_ops / (3 * mac_cycles));
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    @(negedge clk); fl_wr_en = 1; fl_wr_layer = 4'd1; fl_wr_val = fl_t'(4);
    @(negedge clk); fl_wr_en = 0;
    // 3x3 stride 1, ReLU, pooling
    load(0, 2 * 10 * 10, 2 * 2 * 9, 60);
    run("k3s1pool", 10, 10, 2, 2, 3, 3, 1, 1, 1, 0, 1, 10, 4);
    // the FL of layer 1 may have moved: read it back for the next cases
    @(negedge clk); fl_wr_en = 1; fl_wr_val = fl_t'(4);
    @(negedge clk); fl_wr_en = 0;
    load(0, 3 * 6 * 6, 3 * 4, 60);
    run("k1", 6, 6, 3, 4, 1, 1, 1, 0, 0, 0, 1, 10, 4);
    @(negedge clk); fl_wr_en = 1; fl_wr_val = fl_t'(4);
    @(negedge clk); fl_wr_en = 0;
    load(0, 2 * 11 * 11, 3 * 2 * 25, 40);
    run("k5s2", 11, 11, 2, 3, 5, 5, 2, 1, 0, 0, 1, 10, 4);
    @(negedge clk); fl_wr_en = 1; fl_wr_val = fl_t'(4);
    @(negedge clk); fl_wr_en = 0;
    @(negedge clk); fl_wr_en = 1; fl_wr_val = fl_t'(9); fl_wr_wl = 5'd10; m_wl = 10;
    @(negedge clk); fl_wr_en = 0;
    load(0, 1 * 16 * 16, 2 * 16, 40);
    run("k4s4_wl10", 16, 16, 1, 2, 4, 4, 4, 0, 0, 0, 1, 10, 9);
    expect_eq(wl_layer, 10, "word length");
    checks++;
    if (ovf_cnt == 0) begin failures++; $display("10-bit layer never saturated"); end
    fl_wr_wl = 5'd16; m_wl = 16;
    // channel division: 4 input channels as two passes of 2 (weights reloaded per pass)
    @(negedge clk); fl_wr_en = 1; fl_wr_val = fl_t'(4);
    @(negedge clk); fl_wr_en = 0;
    load(0, 2 * 8 * 8, 2 * 2 * 9, 60);
    run("chdiv1", 8, 8, 2, 2, 3, 3, 1, 1, 1, 0, 0, 10, 4);
    load(0, 2 * 8 * 8, 2 * 2 * 9, 60);
    run("chdiv2_pool", 8, 8, 2, 2, 3, 3, 1, 1, 1, 1, 1, 10, 4);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
