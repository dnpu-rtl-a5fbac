// tb_sm_integral4: builds the four-square integral image of a random cost map (and of
// an all-maximum map, the worst case for the entry width) and compares window sums
// for random windows, windows inside one quadrant, windows across the centre and the
// whole image with brute-force sums. The build must take W*H cycles.
module tb_sm_integral4;
  localparam int W = 16, H = 12, CW = 8;
  localparam int SW = $clog2((W / 2) * (H / 2) * (2 ** CW - 1) + 1);
  logic clk = 0, rst_n = 0, start = 0, busy, done;
  logic [3:0] req_x, qx0, qx1;
  logic [3:0] req_y, qy0, qy1;
  logic [CW-1:0] cost;
  logic [SW+1:0] qsum;
  int checks = 0, failures = 0;
  int cmap [H][W];
  always #5 clk = ~clk;

  sm_integral4 #(.W(W), .H(H), .CW(CW)) dut (.*);

  assign cost = CW'(cmap[req_y][req_x]);

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic query(input int x0, input int y0, input int x1, input int y1);
    int s;
    s = 0;
    for (int y = y0; y <= y1; y++) for (int x = x0; x <= x1; x++) s += cmap[y][x];
    qx0 = 4'(x0); qy0 = 4'(y0); qx1 = 4'(x1); qy1 = 4'(y1);
    #1;
    checks++;
    if (int'(qsum) != s) begin
      failures++;
      if (failures < 10) $display("window (%0d,%0d)-(%0d,%0d): %0d expected %0d",
                                  x0, y0, x1, y1, qsum, s);
    end
  endtask

  task automatic build();
    int cyc;
    @(negedge clk); start = 1;
    @(negedge clk); start = 0;
    cyc = 1;
    while (!done) begin @(negedge clk); cyc++; end
    checks++;
    if (cyc != W * H + 1) begin
      failures++;
      $display("build took %0d cycles, expected %0d", cyc, W * H + 1);
    end
  endtask

  initial begin
    qx0 = 0; qy0 = 0; qx1 = 0; qy1 = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int pass = 0; pass < 3; pass++) begin
      for (int y = 0; y < H; y++)
        for (int x = 0; x < W; x++) cmap[y][x] = pass == 2 ? 255 : int'($urandom % 256);
      build();
      query(0, 0, W - 1, H - 1);
      query(0, 0, 0, 0);
      query(W / 2 - 1, H / 2 - 1, W / 2, H / 2);
      query(1, 1, W / 2 - 2, H / 2 - 2);
      query(W / 2 + 1, H / 2, W - 1, H - 2);
      for (int t = 0; t < 400; t++) begin
        int x0, x1, y0, y1;
        x0 = int'($urandom % W); x1 = int'($urandom % W);
        y0 = int'($urandom % H); y1 = int'($urandom % H);
        if (x0 > x1) begin int tt; tt = x0; x0 = x1; x1 = tt; end
        if (y0 > y1) begin int tt; tt = y0; y0 = y1; y1 = tt; end
        query(x0, y0, x1, y1);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
