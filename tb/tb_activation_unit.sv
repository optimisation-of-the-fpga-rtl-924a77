// tb_activation_unit -- checks all four activation choices against the
// reference arithmetic: ReLU (zero for negative sums, saturation at the top),
// linear (saturation on both sides), table sigmoid and piecewise sigmoid, each
// one cycle after the sum is applied.
module tb_activation_unit;
  import cnn_pkg::*;
  import tb_cnn_ref::*;
  logic clk = 0;
  always #5 clk = ~clk;

  acc_t  acc;
  data_t y_relu, y_none, y_lut, y_plan;
  int checks = 0, failures = 0;
  int clipped = 0, saturated = 0;

  activation_unit #(.ACT(ACT_RELU))         u_relu (.clk, .acc, .y(y_relu));
  activation_unit #(.ACT(ACT_NONE))         u_none (.clk, .acc, .y(y_none));
  activation_unit #(.ACT(ACT_SIGMOID_LUT))  u_lut  (.clk, .acc, .y(y_lut));
  activation_unit #(.ACT(ACT_SIGMOID_PLAN)) u_plan (.clk, .acc, .y(y_plan));

  task automatic cmp(input string what, input int got, input int want);
    checks++;
    if (got != want) begin
      failures++;
      if (failures < 8) $display("%s: got %0d want %0d", what, got, want);
    end
  endtask

  initial begin
    for (int i = 0; i < 3000; i++) begin
      longint s;
      case (i % 4)
        0: s = longint'($urandom_range(0, 1 << 30)) - (longint'(1) << 29);
        1: s = (longint'($urandom_range(0, 1 << 30)) - (longint'(1) << 29)) << 10;
        2: s = longint'($urandom_range(0, 1 << 24)) - (longint'(1) << 23);
        default: s = -longint'($urandom_range(0, 1 << 20));
      endcase
      @(negedge clk);
      acc = acc_t'(s);
      @(negedge clk);
      cmp("relu", int'(y_relu), act_ref(ACT_RELU, s));
      cmp("none", int'(y_none), act_ref(ACT_NONE, s));
      cmp("lut",  int'(y_lut),  act_ref(ACT_LUT, s));
      cmp("plan", int'(y_plan), act_ref(ACT_PLAN, s));
      if (s < 0) clipped++;
      if (fdiv(s, 10) > DMAX || fdiv(s, 10) < DMIN) saturated++;
    end
    checks++;
    if (clipped == 0 || saturated == 0) failures++;
    $display("relu clipped %0d, saturated %0d", clipped, saturated);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
