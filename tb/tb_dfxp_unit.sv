// tb_dfxp_unit: checks the dynamic fixed-point quantizer against a real-valued model
// (scale by 2^(FL_out - FL_prod), round half up, saturate to the layer's word length of
// 4 to 16 bits) and the on-line adaptation
// of the per-layer FL: saturations lower it, an unused upper half raises it, a
// well-filled range keeps it, and other layers' entries are untouched.
module tb_dfxp_unit;
  import dnpu_pkg::*;
  logic clk = 0, rst_n = 0;
  logic fl_wr_en = 0;
  logic [3:0] fl_wr_layer = 0, layer = 0;
  fl_t fl_wr_val = 0, fl_out, fl_prod = 0;
  logic [4:0] fl_wr_wl = 16, wl_out;
  acc_t acc_in = 0;
  data_t q_out;
  logic q_ovf, mon_start = 0, mon_valid = 0, mon_end = 0, hi_used;
  logic [31:0] ovf_cnt;
  int checks = 0, failures = 0;
  always #5 clk = ~clk;

  dfxp_unit #(.NLAYER(16), .OVF_TH(0)) dut (.*);

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic expect_eq(input int got, input int want, input string what);
    checks++;
    if (got != want) begin
      failures++;
      if (failures < 10) $display("%s: got %0d expected %0d", what, got, want);
    end
  endtask

  task automatic set_fl(input int l, input int v, input int wl = 16);
    @(negedge clk);
    fl_wr_en = 1; fl_wr_layer = 4'(l); fl_wr_val = fl_t'(v); fl_wr_wl = 5'(wl);
    @(negedge clk);
    fl_wr_en = 0;
  endtask

  // feed n values of magnitude mag (in the product FL) to the monitor, then end the layer
  task automatic run_layer(input int l, input longint mag, input int n);
    @(negedge clk);
    layer = 4'(l); mon_start = 1;
    @(negedge clk);
    mon_start = 0;
    for (int i = 0; i < n; i++) begin
      acc_in = acc_t'(i % 2 ? -mag : mag);
      mon_valid = 1;
      @(negedge clk);
    end
    mon_valid = 0;
    mon_end = 1;
    @(negedge clk);
    mon_end = 0;
  endtask

  initial begin
    real v, r;
    longint a;
    int want;
    repeat (3) @(posedge clk);
    rst_n = 1;
    // ---- quantizer ----
    for (int t = 0; t < 3000; t++) begin
      int flo, flp, wl;
      real lim;
      flo = int'($urandom % 20) - 4;
      flp = flo + int'($urandom % 20) - 4;
      wl  = t % 2 ? 16 : 4 + int'($urandom % 13);
      lim = 2.0 ** (wl - 1);
      set_fl(3, flo, wl);
      layer   = 4'd3;
      fl_prod = fl_t'(flp);
      a = longint'($urandom) - 64'sd2147483648;
      if (t % 3 == 0) a = a >>> ($urandom % 24);
      acc_in = acc_t'(a);
      #1;
      v = real'(a) * (2.0 ** (flo - flp));
      r = $floor(v + 0.5);
      if (r > lim - 1.0) r = lim - 1.0;
      if (r < -lim) r = -lim;
      want = int'(r);
      expect_eq(int'(q_out), want, "quantize");
      expect_eq(int'(q_ovf), int'(v + 0.5 >= lim || v + 0.5 < -lim ? 1 : 0), "ovf flag");
      expect_eq(int'(wl_out), wl, "word length");
    end
    // ---- adaptation ----
    fl_prod = fl_t'(16);
    set_fl(5, 8);
    set_fl(6, 2);
    // values of 2^18 at FL16 are 2^10 at FL8: upper half unused -> FL rises
    run_layer(5, 64'sd1 << 18, 20);
    layer = 4'd5; #1;
    expect_eq(int'(fl_out), 9, "FL raised");
    // values of 2^23 at FL16 are 2^16 at FL9: saturate -> FL drops
    run_layer(5, 64'sd1 << 23, 20);
    layer = 4'd5; #1;
    expect_eq(int'(fl_out), 8, "FL lowered");
    expect_eq(int'(ovf_cnt), 20, "saturation count");
    // values of 3*2^21 at FL16 are 24576 at FL8: well filled -> FL kept
    run_layer(5, 64'sd3 << 21, 20);
    layer = 4'd5; #1;
    expect_eq(int'(fl_out), 8, "FL kept");
    expect_eq(int'(hi_used), 1, "upper half seen");
    layer = 4'd6; #1;
    expect_eq(int'(fl_out), 2, "other layer untouched");
    // an 8-bit layer: values of 3*2^14 at FL16 are 192 at FL8, above 127: saturate -> FL 7
    set_fl(7, 8, 8);
    run_layer(7, 64'sd3 << 14, 10);
    layer = 4'd7; #1;
    expect_eq(int'(fl_out), 7, "8-bit layer FL lowered");
    // 96 at FL7 is in the upper half of the 8-bit range: FL kept
    run_layer(7, 64'sd3 << 14, 10);
    layer = 4'd7; #1;
    expect_eq(int'(fl_out), 7, "8-bit layer FL kept");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
