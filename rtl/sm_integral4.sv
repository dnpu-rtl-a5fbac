// sm_integral4: four-square integral image of a cost map, with window-sum queries.
//
// The image is split at its centre (CX, CY) into four quadrants. In each quadrant the
// integral is accumulated from the centre outwards: S(x,y) is the sum of the cost over
// the rectangle spanned by (x,y) and the quadrant's corner at the image centre. An entry
// therefore never exceeds a quarter of the whole-image sum, which saves two bits per
// entry compared with a single integral image from one corner (SW below).
//
// Build: pulse start. Each cycle the unit asks for the cost of one pixel (req_x, req_y,
// combinational cost input in the same cycle) and writes
//   S(x,y) = c(x,y) + S(x_in,y) + S(x,y_in) - S(x_in,y_in)
// where x_in, y_in are the neighbours towards the centre (zero outside the quadrant).
// Quadrants are scanned one after another, centre outwards, so W*H cycles per build;
// done pulses after the last pixel.
// Query (combinational): the sum over the inclusive window [qx0..qx1] x [qy0..qy1] is
// the sum of its parts in the four quadrants, each taken from four table entries
// (up to 16 reads).
// The four-quadrant integral image and its two-bit saving follow the design
// description; the centre-outward direction, the scan order and the query method are
// this design's choices. W and H must be even.
module sm_integral4 #(
  parameter int W  = 320,   // image width  (QVGA)
  parameter int H  = 240,   // image height (QVGA)
  parameter int CW = 8,     // cost bits
  localparam int SW  = $clog2((W / 2) * (H / 2) * (2 ** CW - 1) + 1),  // entry bits
  localparam int FW  = SW + 2,                                           // window-sum bits
  localparam int XW  = $clog2(W),
  localparam int YW  = $clog2(H)
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          start,
  output logic          busy,
  output logic          done,
  output logic [XW-1:0] req_x,
  output logic [YW-1:0] req_y,
  input  logic [CW-1:0] cost,
  input  logic [XW-1:0] qx0,
  input  logic [YW-1:0] qy0,
  input  logic [XW-1:0] qx1,
  input  logic [YW-1:0] qy1,
  output logic [FW-1:0] qsum
);

  localparam int CX = W / 2;
  localparam int CY = H / 2;

  logic [SW-1:0] s_mem [W * H];

  function automatic logic [SW-1:0] rd(input int x, input int y);
    return s_mem[y * W + x];
  endfunction

  // ---------------- build ----------------
  logic [1:0]    quad;        // bit 0: right half, bit 1: bottom half
  logic [XW-1:0] cc;          // distance from centre column
  logic [YW-1:0] rr;          // distance from centre row
  int            bx, by, bxi, byi;
  logic [SW-1:0] s_new;

  always_comb begin
    bx  = quad[0] ? CX + int'(cc) : CX - 1 - int'(cc);
    by  = quad[1] ? CY + int'(rr) : CY - 1 - int'(rr);
    bxi = quad[0] ? bx - 1 : bx + 1;
    byi = quad[1] ? by - 1 : by + 1;
    s_new = SW'(cost);
    if (cc != '0)             s_new = s_new + rd(bxi, by);
    if (rr != '0)             s_new = s_new + rd(bx, byi);
    if (cc != '0 && rr != '0) s_new = s_new - rd(bxi, byi);
    req_x = XW'(bx);
    req_y = YW'(by);
  end

  always_ff @(posedge clk) begin
    if (busy) s_mem[by * W + bx] <= s_new;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy <= 1'b0;
      done <= 1'b0;
      quad <= '0;
      cc   <= '0;
      rr   <= '0;
    end else begin
      done <= 1'b0;
      if (start && !busy) begin
        busy <= 1'b1;
        quad <= '0;
        cc   <= '0;
        rr   <= '0;
      end else if (busy) begin
        if (int'(cc) == CX - 1) begin
          cc <= '0;
          if (int'(rr) == CY - 1) begin
            rr <= '0;
            if (quad == 2'd3) begin
              busy <= 1'b0;
              done <= 1'b1;
            end
            quad <= quad + 1'b1;
          end else rr <= rr + 1'b1;
        end else cc <= cc + 1'b1;
      end
    end
  end

  // ---------------- window query ----------------
  // Sum over the part of [x0..x1] x [y0..y1] that lies in quadrant q.
  function automatic logic [FW-1:0] quad_sum(input int q, input int x0, input int y0,
                                             input int x1, input int y1);
    int xa, xb, ya, yb, ox, ix, oy, iy;
    logic ixv, iyv;
    logic [FW-1:0] s;
    if (q[0]) begin xa = x0 < CX ? CX : x0; xb = x1; end
    else      begin xa = x0; xb = x1 > CX - 1 ? CX - 1 : x1; end
    if (q[1]) begin ya = y0 < CY ? CY : y0; yb = y1; end
    else      begin ya = y0; yb = y1 > CY - 1 ? CY - 1 : y1; end
    if (xa > xb || ya > yb) return '0;
    if (q[0]) begin ox = xb; ix = xa - 1; ixv = ix >= CX;     end
    else      begin ox = xa; ix = xb + 1; ixv = ix <= CX - 1; end
    if (q[1]) begin oy = yb; iy = ya - 1; iyv = iy >= CY;     end
    else      begin oy = ya; iy = yb + 1; iyv = iy <= CY - 1; end
    s = FW'(rd(ox, oy));
    if (ixv)        s = s - FW'(rd(ix, oy));
    if (iyv)        s = s - FW'(rd(ox, iy));
    if (ixv && iyv) s = s + FW'(rd(ix, iy));
    return s;
  endfunction

  always_comb begin
    qsum = '0;
    for (int q = 0; q < 4; q++)
      qsum = qsum + quad_sum(q, int'(qx0), int'(qy0), int'(qx1), int'(qy1));
  end

endmodule
