// sm_cost_gen: matching-cost generation of the stereo matching processor.
//
// For a pixel (x, y) of the left image and disparity d, the cost is the absolute
// difference between the left pixel and the right pixel at (x - d, y). When x - d falls
// outside the image (r_valid low) the cost is the largest value, so that disparity never
// wins there. Purely combinational; one cost per evaluation.
// Cost generation as the first step of stereo matching follows the design description,
// which computes it inside an SRAM macro with hierarchical bit-lines; this module gives
// the same function in plain logic. The absolute-difference measure and the
// out-of-image cost are this design's choices.
module sm_cost_gen #(
  parameter int PW = 8   // pixel bits
) (
  input  logic [PW-1:0] l_pix,
  input  logic [PW-1:0] r_pix,
  input  logic          r_valid,
  output logic [PW-1:0] cost
);
  always_comb begin
    if (!r_valid)          cost = '1;
    else if (l_pix > r_pix) cost = l_pix - r_pix;
    else                   cost = r_pix - l_pix;
  end
endmodule
