// tb_act_unit: activation unit against real-valued sigmoid, tanh and ReLU over a sweep
// of inputs and fraction lengths. The piecewise-linear fit must stay within 0.02 of
// sigmoid and 0.04 of tanh (plus one output LSB); ReLU and pass-through are exact.
module tb_act_unit;
  import dnpu_pkg::*;
  act_e       act;
  logic [3:0] fl;
  data_t      x, y;
  int checks = 0, failures = 0;
  logic clk = 0;
  always #5 clk = ~clk;

  act_unit dut (.act, .fl, .x, .y);

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input real got, input real want, input real tol, input string what);
    checks++;
    if (got - want > tol || want - got > tol) begin
      failures++;
      if (failures < 10) $display("%s: x=%0d fl=%0d got=%f want=%f", what, x, fl, got, want);
    end
  endtask

  initial begin
    real xr, yr, lsb;
    for (int f = 8; f <= 12; f += 2) begin
      fl  = 4'(f);
      lsb = 1.0 / (2.0 ** f);
      for (int v = -6 * (1 << f); v <= 6 * (1 << f); v += (1 << f) / 16) begin
        x  = data_t'(v);
        xr = real'(v) * lsb;
        act = ACT_SIGMOID; #1; yr = real'(y) * lsb;
        check(yr, 1.0 / (1.0 + $exp(-xr)), 0.02 + lsb, "sigmoid");
        act = ACT_TANH;    #1; yr = real'(y) * lsb;
        check(yr, (1.0 - $exp(-2.0 * xr)) / (1.0 + $exp(-2.0 * xr)), 0.04 + 2 * lsb, "tanh");
        act = ACT_RELU;    #1;
        check(real'(y), v < 0 ? 0.0 : real'(v), 0.0, "relu");
        act = ACT_NONE;    #1;
        check(real'(y), real'(v), 0.0, "none");
        @(posedge clk);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
