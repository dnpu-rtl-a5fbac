// tb_sm_cost_gen: random left/right pixel pairs against an absolute-difference model;
// pixels outside the right image must give the largest cost.
module tb_sm_cost_gen;
  logic [7:0] l_pix, r_pix, cost;
  logic       r_valid;
  int checks = 0, failures = 0;
  logic clk = 0;
  always #5 clk = ~clk;

  sm_cost_gen #(.PW(8)) dut (.l_pix, .r_pix, .r_valid, .cost);

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int exp_c;
    for (int i = 0; i < 2000; i++) begin
      l_pix   = 8'($urandom);
      r_pix   = 8'($urandom);
      r_valid = ($urandom % 8) != 0;
      if (i < 2) begin l_pix = 8'd0; r_pix = 8'd255; r_valid = 1'b1; end
      #1;
      exp_c = r_valid ? (int'(l_pix) > int'(r_pix) ? int'(l_pix) - int'(r_pix)
                                                   : int'(r_pix) - int'(l_pix)) : 255;
      checks++;
      if (int'(cost) != exp_c) begin
        failures++;
        if (failures < 10) $display("mismatch l=%0d r=%0d v=%0d cost=%0d exp=%0d",
                                    l_pix, r_pix, r_valid, cost, exp_c);
      end
      @(posedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
