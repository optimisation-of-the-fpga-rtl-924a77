// tb_conv_layer -- checks whole layers: the first trigger layer (5 feature
// maps, kernel 3, sigmoid table), the first 4-Conv energy layer (2 channels,
// 3 feature maps, kernel 4, ReLU) and a dilated layer (3 channels, 2 feature
// maps, kernel 2, dilation 2, piecewise sigmoid). Every output of every
// feature map is compared at the layer latency.
module tb_conv_layer;
  import cnn_pkg::*;
  logic clk = 0;
  always #5 clk = ~clk;

  localparam int N = 3;
  int   ch [N];
  int   fl [N];
  logic dn [N];
  int   checks, failures;

  tb_layer_check #(.CIN(1), .FM(5), .K(3), .D(1), .ACT(ACT_SIGMOID_LUT))  c0 (.clk, .checks(ch[0]), .failures(fl[0]), .done(dn[0]));
  tb_layer_check #(.CIN(2), .FM(3), .K(4), .D(1), .ACT(ACT_RELU))         c1 (.clk, .checks(ch[1]), .failures(fl[1]), .done(dn[1]));
  tb_layer_check #(.CIN(3), .FM(2), .K(2), .D(2), .ACT(ACT_SIGMOID_PLAN)) c2 (.clk, .checks(ch[2]), .failures(fl[2]), .done(dn[2]));

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
