// stereo_proc: stereo matching processor producing a depth (disparity) map.
//
// Input is a rectified stereo pair of W x H 8-bit images; output is a map of ND
// disparity levels (6 bits for 64 levels). For every disparity d = 0..ND-1:
//   1. build:     sm_integral4 scans the image; for each pixel sm_cost_gen returns
//                 |L(x,y) - R(x-d,y)| and the four-square integral image is written
//                 (W*H cycles);
//   2. aggregate: for each pixel the cost over a (2*WR+1)^2 window, clipped at the
//                 image border, is read from the integral image; if it is lower than
//                 the best so far (or d = 0) the pixel's best cost and disparity are
//                 replaced (winner-take-all, W*H cycles).
// A frame therefore takes about 2*ND*W*H cycles. Ties keep the smaller disparity.
// QVGA input, 64 depth levels, cost generation, the four-square integral image and
// aggregation follow the design description; the cost measure, the window size, the
// disparity-serial schedule and winner-take-all selection are this design's choices.
//
// Interface: host writes the left (l_we) or right (r_we) image at pix_addr = y*W + x
// while idle, pulses start, waits for done, and reads the depth map at dm_addr.
module stereo_proc #(
  parameter int W  = 320,   // QVGA width
  parameter int H  = 240,   // QVGA height
  parameter int ND = 64,    // depth levels
  parameter int WR = 3,     // aggregation window radius (7x7 window)
  localparam int PW  = 8,
  localparam int DW  = $clog2(ND),
  localparam int XW  = $clog2(W),
  localparam int YW  = $clog2(H),
  localparam int PAW = $clog2(W * H),
  localparam int AGW = $clog2((2 * WR + 1) * (2 * WR + 1) * (2 ** PW - 1) + 1),
  localparam int FW  = $clog2((W / 2) * (H / 2) * (2 ** PW - 1) + 1) + 2
) (
  input  logic            clk,
  input  logic            rst_n,
  input  logic            start,
  output logic            busy,
  output logic            done,
  input  logic            l_we,
  input  logic            r_we,
  input  logic [PAW-1:0]  pix_addr,
  input  logic [PW-1:0]   pix_wdata,
  input  logic [PAW-1:0]  dm_addr,
  output logic [DW-1:0]   dm_rdata,
  output logic [31:0]     updates     // winner-take-all replacements in the last frame
);

  typedef enum logic [1:0] {S_IDLE, S_BUILD, S_AGG, S_END} state_e;
  state_e state;

  logic [PW-1:0]  l_mem  [W * H];
  logic [PW-1:0]  r_mem  [W * H];
  logic [DW-1:0]  dm_mem [W * H];
  logic [AGW-1:0] best   [W * H];

  logic [DW-1:0]  d;
  logic [XW-1:0]  ax;
  logic [YW-1:0]  ay;
  logic           ib_start, ib_busy, ib_done;
  logic [XW-1:0]  req_x;
  logic [YW-1:0]  req_y;
  logic [PW-1:0]  cost;
  logic [XW-1:0]  qx0, qx1;
  logic [YW-1:0]  qy0, qy1;
  logic [FW-1:0]  qsum;
  logic           started;

  // ---------------- cost generation ----------------
  logic        r_valid;
  logic [31:0] rx;
  always_comb begin
    r_valid = int'(req_x) >= int'(d);
    rx      = r_valid ? 32'(req_x) - 32'(d) : '0;
  end

  sm_cost_gen #(.PW(PW)) u_cost (
    .l_pix   (l_mem[PAW'(int'(req_y) * W + int'(req_x))]),
    .r_pix   (r_mem[PAW'(int'(req_y) * W + int'(rx))]),
    .r_valid (r_valid),
    .cost    (cost)
  );

  // ---------------- integral image and aggregation window ----------------
  always_comb begin
    qx0 = int'(ax) < WR ? '0 : XW'(int'(ax) - WR);
    qy0 = int'(ay) < WR ? '0 : YW'(int'(ay) - WR);
    qx1 = int'(ax) + WR > W - 1 ? XW'(W - 1) : XW'(int'(ax) + WR);
    qy1 = int'(ay) + WR > H - 1 ? YW'(H - 1) : YW'(int'(ay) + WR);
  end

  sm_integral4 #(.W(W), .H(H), .CW(PW)) u_int (
    .clk, .rst_n,
    .start (ib_start),
    .busy  (ib_busy),
    .done  (ib_done),
    .req_x, .req_y,
    .cost,
    .qx0, .qy0, .qx1, .qy1,
    .qsum
  );

  // ---------------- winner-take-all ----------------
  logic [PAW-1:0] apix;
  logic [AGW-1:0] agg;
  logic           win;
  assign apix = PAW'(int'(ay) * W + int'(ax));
  assign agg  = AGW'(qsum);
  assign win  = d == '0 || agg < best[apix];

  assign ib_start = state == S_BUILD && !started;
  assign busy     = state != S_IDLE;
  assign dm_rdata = dm_mem[dm_addr];

  always_ff @(posedge clk) begin
    if (l_we && state == S_IDLE) l_mem[pix_addr] <= pix_wdata;
    if (r_we && state == S_IDLE) r_mem[pix_addr] <= pix_wdata;
    if (state == S_AGG && win) begin
      best[apix]   <= agg;
      dm_mem[apix] <= d;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state   <= S_IDLE;
      done    <= 1'b0;
      d       <= '0;
      ax      <= '0;
      ay      <= '0;
      started <= 1'b0;
      updates <= '0;
    end else begin
      done <= 1'b0;
      unique case (state)
        S_IDLE: if (start) begin
          d       <= '0;
          started <= 1'b0;
          updates <= '0;
          state   <= S_BUILD;
        end
        S_BUILD: begin
          started <= 1'b1;
          if (ib_done) begin
            ax    <= '0;
            ay    <= '0;
            state <= S_AGG;
          end
        end
        S_AGG: begin
          if (win && d != '0) updates <= updates + 1;
          if (int'(ax) == W - 1) begin
            ax <= '0;
            if (int'(ay) == H - 1) begin
              ay      <= '0;
              started <= 1'b0;
              if (int'(d) == ND - 1) state <= S_END;
              else begin
                d     <= d + 1'b1;
                state <= S_BUILD;
              end
            end else ay <= ay + 1'b1;
          end else ax <= ax + 1'b1;
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
