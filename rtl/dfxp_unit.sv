// dfxp_unit: layer-by-layer dynamic fixed-point with on-line fraction-length adaptation.
//
// Every layer keeps its own word length (WL, 2..DATA_W bits) and fraction length (FL)
// in a small table. A full-precision accumulator value whose FL is fl_prod is rounded
// (round half up) to the layer FL and saturated to the layer WL; the result is stored
// sign-extended in a DATA_W-bit word. This path is combinational.
//
// While a layer runs, the unit watches every value it quantizes (mon_valid): it counts
// saturations and notes whether any result used the upper half of the WL range. When the
// layer ends (mon_end) the layer's FL is updated for the next image:
//   more than OVF_TH saturations  -> FL - 1 (one more integer bit)
//   otherwise, upper half unused  -> FL + 1 (one more fraction bit)
//   otherwise                     -> FL unchanged
// So the FL follows the current input instead of being fixed by off-line training.
// The per-layer WL and FL and the adaptation on the chip follow the design description;
// the adaptation rule itself, the threshold and the FL limits are this design's choices.
// The WL is set by the host and does not adapt.
//
// Timing: q_out/q_ovf are combinational; FL table and statistics update on the clock
// edge. mon_start clears the statistics; mon_end must come at least one cycle after
// the last mon_valid.
module dfxp_unit
  import dnpu_pkg::*;
#(
  parameter int NLAYER = 16,   // entries of the FL table
  parameter int OVF_TH = 0     // saturations tolerated before the FL is lowered
) (
  input  logic                      clk,
  input  logic                      rst_n,
  // FL table initialisation
  input  logic                      fl_wr_en,
  input  logic [$clog2(NLAYER)-1:0] fl_wr_layer,
  input  fl_t                       fl_wr_val,
  input  logic [4:0]                fl_wr_wl,    // word length written with the FL
  // layer selection
  input  logic [$clog2(NLAYER)-1:0] layer,
  output fl_t                       fl_out,      // FL of the selected layer
  output logic [4:0]                wl_out,      // WL of the selected layer
  // quantizer
  input  acc_t                      acc_in,
  input  fl_t                       fl_prod,     // FL of acc_in
  output data_t                     q_out,
  output logic                      q_ovf,
  // monitor
  input  logic                      mon_start,
  input  logic                      mon_valid,
  input  logic                      mon_end,
  output logic [31:0]               ovf_cnt,
  output logic                      hi_used
);

  localparam int LIM_MAX = 2 ** (FL_W - 1) - 1;
  localparam int LIM_MIN = -(2 ** (FL_W - 1));

  fl_t        fl_tab [NLAYER];
  logic [4:0] wl_tab [NLAYER];

  assign fl_out = fl_tab[layer];
  assign wl_out = wl_tab[layer];

  // ---------------- quantizer ----------------
  logic signed [FL_W:0] sh;
  logic signed [63:0]   wide, rnd;
  logic signed [63:0]   qmax, qmin;

  always_comb begin
    sh   = {fl_prod[FL_W-1], fl_prod} - {fl_out[FL_W-1], fl_out};
    wide = 64'(acc_in);
    if (sh > 0) begin
      rnd = (wide + (64'sd1 <<< (sh - 1))) >>> sh;
    end else begin
      rnd = wide <<< (-sh);
    end
    qmax  = (64'sd1 <<< (wl_out - 1'b1)) - 1;
    qmin  = -(64'sd1 <<< (wl_out - 1'b1));
    q_ovf = 1'b0;
    if (rnd > qmax) begin
      q_out = data_t'(qmax);
      q_ovf = 1'b1;
    end else if (rnd < qmin) begin
      q_out = data_t'(qmin);
      q_ovf = 1'b1;
    end else begin
      q_out = data_t'(rnd);
    end
  end

  // ---------------- monitor and adaptation ----------------
  logic hi_now;
  assign hi_now = 64'(q_out) > (qmax >>> 1) || 64'(q_out) < (qmin >>> 1);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      ovf_cnt <= '0;
      hi_used <= 1'b0;
      for (int i = 0; i < NLAYER; i++) begin
        fl_tab[i] <= '0;
        wl_tab[i] <= 5'(DATA_W);
      end
    end else begin
      if (fl_wr_en) begin
        fl_tab[fl_wr_layer] <= fl_wr_val;
        wl_tab[fl_wr_layer] <= (fl_wr_wl < 5'd2 || 32'(fl_wr_wl) > DATA_W) ? 5'(DATA_W) : fl_wr_wl;
      end
      if (mon_start) begin
        ovf_cnt <= '0;
        hi_used <= 1'b0;
      end else if (mon_valid) begin
        if (q_ovf) ovf_cnt <= ovf_cnt + 1;
        if (hi_now) hi_used <= 1'b1;
      end
      if (mon_end && !fl_wr_en) begin
        if (ovf_cnt > 32'(OVF_TH)) begin
          if (int'(fl_out) > LIM_MIN) fl_tab[layer] <= fl_out - 1'b1;
        end else if (!hi_used) begin
          if (int'(fl_out) < LIM_MAX) fl_tab[layer] <= fl_out + 1'b1;
        end
      end
    end
  end

endmodule
