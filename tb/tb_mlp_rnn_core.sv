// tb_mlp_rnn_core: fully-connected layers with 4-bit weight indices against a model that
// multiplies with the codebook values directly. Sizes that are not multiples of eight,
// a bias row (constant-1 input), shift with rounding, saturation, ReLU, no activation,
// sigmoid / tanh (within the piecewise-linear tolerance) and a layer split into two
// passes that continue the accumulators are covered. The
// start-to-done cycle count must be ceil(N/8)*(18 + ceil(M/8)) + M + 2.
// The element-wise operations (product with shift, saturating sum, activation only) are
// checked on random vectors and then chained into one LSTM cell update,
// c' = f*c + i*g and h = o*tanh(c'), against a model of the data buffer; they must take
// ceil(n/8) + 2 cycles.
module tb_mlp_rnn_core;
  import dnpu_pkg::*;
  localparam int NQ = 8, QB = 4, DD = 1024, WDP = 128, AD = 256;

  logic clk = 0, rst_n = 0, start = 0, busy, done;
  mlp_cfg_t cfg;
  logic d_we = 0, w_we = 0, cb_we = 0;
  logic [9:0] d_addr = 0;
  logic [6:0] w_addr = 0;
  data_t d_wdata = 0, d_rdata, cb_wdata = 0;
  logic [255:0] w_wdata = 0;
  logic [3:0] cb_idx = 0;
  logic [31:0] qt_builds, lut_mults, elem_ops;
  int checks = 0, failures = 0;
  always #5 clk = ~clk;

  mlp_rnn_core #(.NQ(NQ), .QB(QB), .DATA_DEPTH(DD), .W_DEPTH(WDP), .ACC_DEPTH(AD)) dut (.*);

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int m_cb [16];
  int m_x  [DD];
  int m_idx[64][64];   // [input][output]
  longint m_acc[64];
  int m_d[DD];         // model of the data buffer for the element-wise operations

  function automatic real act_real(input act_e act, input real x);
    if (act == ACT_SIGMOID) return 1.0 / (1.0 + $exp(-x));
    return (1.0 - $exp(-2.0 * x)) / (1.0 + $exp(-2.0 * x));
  endfunction

  task automatic put(input int addr, input int v);
    m_d[addr] = v;
    @(negedge clk); d_we = 1; d_addr = 10'(addr); d_wdata = data_t'(v);
    @(negedge clk); d_we = 0;
  endtask

  // one element-wise operation over n elements: a at ab, b at bb, result at ob
  task automatic elem(input string name, input mlp_op_e op, input int n, input int ab,
                      input int bb, input int ob, input int shift, input act_e act,
                      input int afl);
    int cyc, e0, guard;
    e0 = int'(elem_ops);
    d_addr = 10'(ob + n); #1;
    guard = int'(d_rdata);
    cfg = '0;
    cfg.op = op; cfg.n_out = 12'(n); cfg.in_base = 12'(ab); cfg.w_base = 12'(bb);
    cfg.out_base = 12'(ob); cfg.shift = 5'(shift); cfg.act = act; cfg.act_fl = 4'(afl);
    @(negedge clk); start = 1;
    @(negedge clk); start = 0;
    cyc = 1;
    while (!done) begin @(negedge clk); cyc++; end
    expect_eq(cyc, (n + 7) / 8 + 2, {name, " cycles"});
    expect_eq(int'(elem_ops) - e0, n, {name, " element count"});
    for (int i = 0; i < n; i++) begin
      longint r;
      real lsb, yr, want;
      case (op)
        OP_EMUL: begin
          r = longint'(m_d[ab + i]) * longint'(m_d[bb + i]);
          if (shift != 0) r = (r + (64'sd1 <<< (shift - 1))) >>> shift;
        end
        OP_EADD: r = longint'(m_d[ab + i]) + longint'(m_d[bb + i]);
        default: r = longint'(m_d[ab + i]);
      endcase
      if (r > 32767) r = 32767;
      if (r < -32768) r = -32768;
      if (act == ACT_RELU && r < 0) r = 0;
      d_addr = 10'(ob + i); #1;
      if (act == ACT_NONE || act == ACT_RELU) begin
        expect_eq(int'(d_rdata), r, $sformatf("%s o[%0d]", name, i));
        m_d[ob + i] = int'(r);
      end else begin
        lsb  = 1.0 / (2.0 ** afl);
        yr   = real'(d_rdata) * lsb;
        want = act_real(act, real'(r) * lsb);
        checks++;
        if (yr - want > 0.045 || want - yr > 0.045) begin
          failures++;
          if (failures < 12) $display("%s o[%0d]: %f expected %f", name, i, yr, want);
        end
        m_d[ob + i] = int'(d_rdata);
      end
    end
    // the element just past the vector must be left alone
    d_addr = 10'(ob + n); #1;
    expect_eq(int'(d_rdata), guard, {name, " guard"});
    $display("%s: %0d elements in %0d cycles", name, n, cyc);
  endtask

  task automatic rand_vec(input int base, input int n, input int r);
    for (int i = 0; i < n; i++) put(base + i, int'($urandom % (2 * r + 1)) - r);
  endtask

  task automatic expect_eq(input longint got, input longint want, input string what);
    checks++;
    if (got != want) begin
      failures++;
      if (failures < 12) $display("%s: got %0d expected %0d", what, got, want);
    end
  endtask

  task automatic layer(input string name, input int n, input int m, input int wr, input int xr,
                       input int shift, input act_e act, input int afl,
                       input bit keep = 1'b0);
    int hg, cyc;
    hg = (m + 7) / 8;
    for (int k = 0; k < 16; k++) begin
      m_cb[k] = int'($urandom % (2 * wr + 1)) - wr;
      @(negedge clk); cb_we = 1; cb_idx = 4'(k); cb_wdata = data_t'(m_cb[k]);
    end
    @(negedge clk); cb_we = 0;
    // inputs at 100.., element 0 is the bias input 1.0 (in FL afl)
    for (int i = 0; i < n; i++) begin
      m_x[i] = (i == 0 && !keep) ? (1 << afl) : int'($urandom % (2 * xr + 1)) - xr;
      @(negedge clk); d_we = 1; d_addr = 10'(100 + i); d_wdata = data_t'(m_x[i]);
    end
    @(negedge clk); d_we = 0;
    for (int g = 0; g < (n + 7) / 8; g++)
      for (int h = 0; h < hg; h++) begin
        logic [255:0] word;
        for (int mm = 0; mm < 8; mm++)
          for (int k = 0; k < 8; k++) begin
            logic [3:0] ix;
            ix = 4'($urandom);
            word[(mm * 8 + k) * 4 +: 4] = ix;
            if (g * 8 + k < 64 && h * 8 + mm < 64) m_idx[g * 8 + k][h * 8 + mm] = int'(ix);
          end
        @(negedge clk); w_we = 1; w_addr = 7'(5 + g * hg + h); w_wdata = word;
      end
    @(negedge clk); w_we = 0;
    cfg = '0;
    cfg.n_in = 12'(n); cfg.n_out = 12'(m); cfg.in_base = 12'd100; cfg.out_base = 12'd500;
    cfg.w_base = 12'd5; cfg.shift = 5'(shift); cfg.act = act; cfg.act_fl = 4'(afl);
    cfg.acc_keep = keep;
    @(negedge clk); start = 1;
    @(negedge clk); start = 0;
    cyc = 1;
    while (!done) begin @(negedge clk); cyc++; end
    expect_eq(cyc, ((n + 7) / 8) * (18 + hg) + m + 2, {name, " cycles"});
    for (int o = 0; o < m; o++) begin
      longint acc, r;
      real lsb, xr2, yr, want;
      acc = keep ? m_acc[o] : 0;
      for (int i = 0; i < n; i++) acc += longint'(m_x[i]) * longint'(m_cb[m_idx[i][o]]);
      m_acc[o] = acc;
      r = shift == 0 ? acc : (acc + (64'sd1 <<< (shift - 1))) >>> shift;
      if (r > 32767) r = 32767;
      if (r < -32768) r = -32768;
      d_addr = 10'(500 + o); #1;
      lsb = 1.0 / (2.0 ** afl);
      xr2 = real'(r) * lsb;
      yr  = real'(d_rdata) * lsb;
      case (act)
        ACT_NONE: expect_eq(int'(d_rdata), r, $sformatf("%s o[%0d]", name, o));
        ACT_RELU: expect_eq(int'(d_rdata), r < 0 ? 0 : r, $sformatf("%s o[%0d]", name, o));
        default: begin
          if (act == ACT_SIGMOID) want = 1.0 / (1.0 + $exp(-xr2));
          else want = (1.0 - $exp(-2.0 * xr2)) / (1.0 + $exp(-2.0 * xr2));
          checks++;
          if (yr - want > 0.045 || want - yr > 0.045) begin
            failures++;
            if (failures < 12) $display("%s o[%0d]: %f expected %f", name, o, yr, want);
          end
        end
      endcase
    end
    $display("%s: %0dx%0d in %0d cycles, %0d table builds, %0d lookups", name, n, m, cyc,
             qt_builds, lut_mults);
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    layer("fc_none",    20, 19, 3000, 3000, 10, ACT_NONE, 8);
    layer("fc_relu",    16, 8,  3000, 3000, 10, ACT_RELU, 8);
    layer("fc_sat",     9,  3,  30000, 30000, 4, ACT_NONE, 8);
    layer("fc_sigmoid", 24, 17, 400,  400,  8, ACT_SIGMOID, 10);
    layer("lstm_tanh",  40, 33, 400,  400,  8, ACT_TANH, 10);
    // a 56-input layer run as two passes over input slices of 32 and 24
    layer("split_1",    32, 20, 3000, 3000, 10, ACT_NONE, 8);
    layer("split_2",    24, 20, 3000, 3000, 10, ACT_NONE, 8, 1'b1);
    // element-wise operations on random vectors
    rand_vec(600, 27, 30000);
    rand_vec(700, 27, 30000);
    elem("emul_sh12",  OP_EMUL, 27, 600, 700, 900, 12, ACT_NONE, 10);
    elem("emul_sh0",   OP_EMUL, 19, 600, 700, 930, 0, ACT_NONE, 10);
    elem("eadd_sat",   OP_EADD, 16, 600, 700, 960, 0, ACT_NONE, 10);
    elem("eadd_relu",  OP_EADD, 5,  610, 710, 980, 0, ACT_RELU, 10);
    rand_vec(600, 24, 6000);
    elem("eact_sig",   OP_EACT, 24, 600, 600, 900, 0, ACT_SIGMOID, 10);
    elem("eact_tanh",  OP_EACT, 9,  600, 600, 930, 0, ACT_TANH, 10);
    // LSTM cell update with gates in FL 10: f, i, o in [0, 1], g in [-1, 1], c in [-2, 2]
    for (int k = 0; k < 20; k++) begin
      put(600 + k, int'($urandom % 1025));            // f
      put(620 + k, int'($urandom % 1025));            // i
      put(640 + k, int'($urandom % 2049) - 1024);     // g
      put(660 + k, int'($urandom % 1025));            // o
      put(680 + k, int'($urandom % 4097) - 2048);     // c
    end
    elem("lstm_fc",    OP_EMUL, 20, 600, 680, 700, 10, ACT_NONE, 10);
    elem("lstm_ig",    OP_EMUL, 20, 620, 640, 720, 10, ACT_NONE, 10);
    elem("lstm_c",     OP_EADD, 20, 700, 720, 680, 0, ACT_NONE, 10);
    elem("lstm_tanhc", OP_EACT, 20, 680, 680, 740, 0, ACT_TANH, 10);
    elem("lstm_h",     OP_EMUL, 20, 660, 740, 760, 10, ACT_NONE, 10);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
