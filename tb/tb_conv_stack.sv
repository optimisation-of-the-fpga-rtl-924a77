// tb_conv_stack -- checks layer stacks end to end: the default trigger
// sub-network (5 feature maps kernel 3, then 1 feature map kernel 6, sigmoid
// table), the two-layer trigger example with dilation (10 feature maps kernel
// 3, then kernel 2 with dilation 2, piecewise sigmoid) and the four-layer
// benchmark network (kernel 2, 3 feature maps in all but the last layer).
module tb_conv_stack;
  import cnn_pkg::*;
  logic clk = 0;
  always #5 clk = ~clk;

  localparam int N = 3;
  int   ch [N];
  int   fl [N];
  logic dn [N];
  int   checks, failures;

  tb_stack_check c0 (.clk, .checks(ch[0]), .failures(fl[0]), .done(dn[0]));
  tb_stack_check #(.NL(2), .KS('{0: 3, 1: 2, default: 1}), .DS('{0: 1, 1: 2, default: 1}),
                   .FMS('{0: 10, 1: 1, default: 1}), .ACTS('{default: ACT_SIGMOID_PLAN}))
    c1 (.clk, .checks(ch[1]), .failures(fl[1]), .done(dn[1]));
  tb_stack_check #(.NL(4), .KS('{default: 2}), .DS('{default: 1}),
                   .FMS('{0: 3, 1: 3, 2: 3, default: 1}), .ACTS('{default: ACT_SIGMOID_LUT}))
    c2 (.clk, .checks(ch[2]), .failures(fl[2]), .done(dn[2]));

  initial begin
    bit all;
    do begin
      @(negedge clk);
      all = 1;
      for (int i = 0; i < N; i++) all &= dn[i];
    end while (!all);
    checks = 0; failures = 0;
    for (int i = 0; i < N; i++) begin checks += ch[i]; failures += fl[i]; end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    $display("watchdog expired");
    checks = 0; failures = 1;
    for (int i = 0; i < N; i++) begin checks += ch[i]; failures += fl[i]; end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
