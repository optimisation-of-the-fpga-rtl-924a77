// tb_feature_map -- runs tb_fm_check for the feature-map shapes of the
// networks: trigger layers (1 channel, kernel 3; 5 channels, kernel 6),
// energy layers (2 channels, kernel 4 and 21; 3 channels, kernel 3), the
// dilated trigger layer (10 channels, kernel 2, dilation 2) and a further
// dilated odd case, covering paired and odd paths, odd and even kernels and
// every activation. Each output is checked at the exact layer latency.
module tb_feature_map;
  import cnn_pkg::*;
  logic clk = 0;
  always #5 clk = ~clk;

  localparam int N = 8;
  int   ch [N];
  int   fl [N];
  logic dn [N];
  int   checks, failures;

  tb_fm_check #(.CIN(1),  .K(3),  .D(1), .ACT(ACT_SIGMOID_LUT))  c0 (.clk, .checks(ch[0]), .failures(fl[0]), .done(dn[0]));
  tb_fm_check #(.CIN(5),  .K(6),  .D(1), .ACT(ACT_SIGMOID_LUT))  c1 (.clk, .checks(ch[1]), .failures(fl[1]), .done(dn[1]));
  tb_fm_check #(.CIN(2),  .K(4),  .D(1), .ACT(ACT_RELU))         c2 (.clk, .checks(ch[2]), .failures(fl[2]), .done(dn[2]));
  tb_fm_check #(.CIN(3),  .K(3),  .D(1), .ACT(ACT_RELU))         c3 (.clk, .checks(ch[3]), .failures(fl[3]), .done(dn[3]));
  tb_fm_check #(.CIN(10), .K(2),  .D(2), .ACT(ACT_SIGMOID_PLAN)) c4 (.clk, .checks(ch[4]), .failures(fl[4]), .done(dn[4]));
  tb_fm_check #(.CIN(3),  .K(5),  .D(3), .ACT(ACT_NONE))         c5 (.clk, .checks(ch[5]), .failures(fl[5]), .done(dn[5]));
  tb_fm_check #(.CIN(2),  .K(21), .D(1), .ACT(ACT_RELU))         c6 (.clk, .checks(ch[6]), .failures(fl[6]), .done(dn[6]));
  tb_fm_check #(.CIN(1),  .K(4),  .D(2), .ACT(ACT_NONE))         c7 (.clk, .checks(ch[7]), .failures(fl[7]), .done(dn[7]));

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
