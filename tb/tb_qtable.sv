// tb_qtable: builds Q-tables for random inputs and codebooks, checks that the table is
// ready exactly 16 cycles after build, and that every read port returns x * cb[idx].
module tb_qtable;
  import dnpu_pkg::*;
  localparam int QB = 4, NR = 8, NE = 16;
  logic clk = 0, rst_n = 0, build = 0, ready;
  data_t x;
  data_t cb [NE];
  logic [QB-1:0] idx [NR];
  logic signed [31:0] val [NR];
  int checks = 0, failures = 0;
  always #5 clk = ~clk;

  qtable #(.QB(QB), .NR(NR)) dut (.clk, .rst_n, .build, .x, .cb, .ready, .idx, .val);

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int cyc;
    data_t xs;
    data_t cbs [NE];
    for (int i = 0; i < NR; i++) idx[i] = '0;
    x = '0;
    for (int k = 0; k < NE; k++) cb[k] = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int t = 0; t < 50; t++) begin
      @(negedge clk);
      xs = data_t'($urandom);
      if (t == 0) xs = 16'sh8000;
      for (int k = 0; k < NE; k++) begin
        cbs[k] = data_t'($urandom);
        cb[k]  = cbs[k];
      end
      x = xs;
      build = 1;
      @(negedge clk);
      build = 0;
      // scramble the inputs: the table must use the latched values
      x = data_t'($urandom);
      for (int k = 0; k < NE; k++) cb[k] = data_t'($urandom);
      cyc = 1;
      while (!ready) begin @(negedge clk); cyc++; end
      checks++;
      if (cyc != NE + 1) begin
        failures++;
        $display("build latency %0d cycles, expected %0d", cyc, NE + 1);
      end
      for (int r = 0; r < 4; r++) begin
        for (int p = 0; p < NR; p++) idx[p] = QB'($urandom);
        if (r == 0) for (int p = 0; p < NR; p++) idx[p] = QB'(p * 2 + 1);
        #1;
        for (int p = 0; p < NR; p++) begin
          checks++;
          if (val[p] != 32'(xs) * 32'(cbs[idx[p]])) begin
            failures++;
            if (failures < 10) $display("port %0d idx %0d: %0d expected %0d", p, idx[p],
                                        val[p], 32'(xs) * 32'(cbs[idx[p]]));
          end
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
