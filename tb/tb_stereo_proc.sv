// tb_stereo_proc: a textured left image and a right image shifted by a known disparity
// per region are matched; the depth map is compared pixel by pixel with a brute-force
// model of the same algorithm (absolute-difference cost, clipped square window,
// winner-take-all, ties to the smaller disparity), the interior of each region must
// show its true disparity, and the frame must take ND*(2*W*H + 2) + 2 cycles. A second,
// flat frame makes every disparity tie, so tie-breaking is checked too.
module tb_stereo_proc;
  localparam int W = 32, H = 16, ND = 8, WR = 2;
  logic clk = 0, rst_n = 0, start = 0, busy, done;
  logic l_we = 0, r_we = 0;
  logic [8:0] pix_addr = 0, dm_addr = 0;
  logic [7:0] pix_wdata = 0;
  logic [2:0] dm_rdata;
  logic [31:0] updates;
  int checks = 0, failures = 0;
  int L [H][W], R [H][W], truth [H][W], model_d [H][W];
  always #5 clk = ~clk;

  stereo_proc #(.W(W), .H(H), .ND(ND), .WR(WR)) dut (.*);

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int cst(input int x, input int y, input int d);
    if (x < d) return 255;
    return L[y][x] > R[y][x - d] ? L[y][x] - R[y][x - d] : R[y][x - d] - L[y][x];
  endfunction

  task automatic frame(input bit textured);
    int cyc;
    // left image: random texture, right image left shifted by 5 (top half) or 2 (bottom);
    // or both flat, where every disparity ties and the smallest must win
    for (int y = 0; y < H; y++)
      for (int x = 0; x < W; x++) L[y][x] = textured ? int'($urandom % 256) : 100;
    for (int y = 0; y < H; y++)
      for (int x = 0; x < W; x++) begin
        truth[y][x] = !textured ? 0 : (y < H / 2 ? 5 : 2);
        R[y][x] = x + truth[y][x] < W ? L[y][x + truth[y][x]] : int'($urandom % 256);
      end
    for (int y = 0; y < H; y++)
      for (int x = 0; x < W; x++) begin
        int best, bd;
        for (int d = 0; d < ND; d++) begin
          int s;
          s = 0;
          for (int yy = y - WR; yy <= y + WR; yy++)
            for (int xx = x - WR; xx <= x + WR; xx++)
              if (yy >= 0 && yy < H && xx >= 0 && xx < W) s += cst(xx, yy, d);
          if (d == 0 || s < best) begin best = s; bd = d; end
        end
        model_d[y][x] = bd;
      end
    for (int i = 0; i < W * H; i++) begin
      @(negedge clk); l_we = 1; pix_addr = 9'(i); pix_wdata = 8'(L[i / W][i % W]);
      @(negedge clk); l_we = 0; r_we = 1; pix_wdata = 8'(R[i / W][i % W]);
    end
    @(negedge clk); r_we = 0;
    @(negedge clk); start = 1;
    @(negedge clk); start = 0;
    cyc = 1;
    while (!done) begin @(negedge clk); cyc++; end
    checks++;
    if (cyc != ND * (2 * W * H + 2) + 2) begin
      failures++;
      $display("frame took %0d cycles, expected %0d", cyc, ND * (2 * W * H + 2) + 2);
    end
    for (int y = 0; y < H; y++)
      for (int x = 0; x < W; x++) begin
        dm_addr = 9'(y * W + x); #1;
        checks++;
        if (int'(dm_rdata) != model_d[y][x]) begin
          failures++;
          if (failures < 10) $display("(%0d,%0d): %0d expected %0d", x, y, dm_rdata, model_d[y][x]);
        end
        if (x >= 8 && x < W - 8 && (y < H / 2 - WR || y >= H / 2 + WR)) begin
          checks++;
          if (int'(dm_rdata) != truth[y][x]) begin
            failures++;
            if (failures < 10) $display("(%0d,%0d): %0d true disparity %0d", x, y, dm_rdata, truth[y][x]);
          end
        end
      end
    $display("frame: %0d cycles, %0d winner updates", cyc, updates);
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    frame(1'b1);
    frame(1'b0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
