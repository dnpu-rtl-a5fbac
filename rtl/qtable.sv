// qtable: quantization table (Q-table) for LUT-based multiplication.
//
// Weights of an MLP or RNN layer are quantized to 2**QB values (a codebook), so each
// weight is stored as a QB-bit index. For one input element x the table precomputes
// x * cb[k] for every codebook entry k; afterwards every product of x with a weight is
// a table read addressed by the weight index, with no multiplier in the path.
//
// Building: pulse build with x and cb valid (they are latched). One shared multiplier
// fills one entry per cycle, so the table is ready 2**QB cycles later (ready rises).
// Lookup: NR independent read ports, combinational (idx -> val).
// Precomputing products for each quantized weight and reading them by index follow the
// design description; the single multiplier filling one entry per cycle and the port
// count are this design's choices.
module qtable
  import dnpu_pkg::*;
#(
  parameter int QB = 4,   // weight index bits (16-bit weight -> 4-bit index)
  parameter int NR = 8,   // read ports (one per output lane)
  localparam int NE = 2 ** QB
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    build,
  input  data_t                   x,
  input  data_t                   cb [NE],
  output logic                    ready,
  input  logic [QB-1:0]           idx [NR],
  output logic signed [2*DATA_W-1:0] val [NR]
);

  typedef logic signed [2*DATA_W-1:0] prod_t;

  prod_t         tab [NE];
  data_t         x_q;
  data_t         cb_q [NE];
  logic [QB:0]   k;          // entry being filled; NE when done

  assign ready = k[QB];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      k   <= (QB+1)'(NE);
      x_q <= '0;
      for (int i = 0; i < NE; i++) begin
        cb_q[i] <= '0;
        tab[i]  <= '0;
      end
    end else if (build) begin
      x_q  <= x;
      cb_q <= cb;
      k    <= '0;
    end else if (!ready) begin
      tab[k[QB-1:0]] <= x_q * cb_q[k[QB-1:0]];
      k              <= k + 1'b1;
    end
  end

  always_comb begin
    for (int r = 0; r < NR; r++) val[r] = tab[idx[r]];
  end

endmodule
