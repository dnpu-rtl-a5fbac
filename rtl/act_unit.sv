// act_unit: activation functions of the MLP-RNN processor (ReLU, sigmoid, tanh).
//
// Input and output are DATA_W-bit fixed-point numbers with fl fraction bits (fl is a
// run-time input, 0..DATA_W-2). Sigmoid uses a four-segment piecewise-linear fit
// with power-of-two slopes (shift and add only):
//   |x| >= 5         : 1
//   2.375 <= |x| < 5 : |x|/32 + 0.84375
//   1 <= |x| < 2.375 : |x|/8  + 0.625
//   0 <= |x| < 1     : |x|/4  + 0.5
// and sigmoid(-x) = 1 - sigmoid(x). tanh is derived as 2*sigmoid(2x) - 1.
// The set of functions is given by the design description; how they are computed is
// this design's choice. Purely combinational.
module act_unit
  import dnpu_pkg::*;
(
  input  act_e        act,
  input  logic [3:0]  fl,
  input  data_t       x,
  output data_t       y
);

  // sigmoid of a value v with fl fraction bits, result with fl fraction bits
  function automatic logic signed [31:0] sigm(input logic signed [31:0] v, input int f);
    logic signed [31:0] a, r, one;
    one = 32'sd1 <<< f;
    a   = v < 0 ? -v : v;
    if (a >= (32'sd5 <<< f))                    r = one;
    else if ((a <<< 3) >= (32'sd19 <<< f))      r = (a >>> 5) + ((32'sd27 <<< f) >>> 5);
    else if (a >= one)                          r = (a >>> 3) + ((32'sd5 <<< f) >>> 3);
    else                                        r = (a >>> 2) + (one >>> 1);
    return v < 0 ? one - r : r;
  endfunction

  logic signed [31:0] xs, t;
  always_comb begin
    xs = 32'(x);
    unique case (act)
      ACT_RELU:    t = xs < 0 ? 32'sd0 : xs;
      ACT_SIGMOID: t = sigm(xs, int'(fl));
      ACT_TANH:    t = (sigm(xs <<< 1, int'(fl)) <<< 1) - (32'sd1 <<< fl);
      default:     t = xs;
    endcase
    y = data_t'(t);
  end

endmodule
