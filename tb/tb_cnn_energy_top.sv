// tb_cnn_energy_top -- end-to-end test of the energy-reconstruction network in
// three configurations, each through tb_net_check:
//   * 4-Conv (the default): trigger 5x k3 + 1x k6 (sigmoid table), energy
//     3x k4 + 1x k3 (ReLU), latency 58 cycles;
//   * 3-Conv: same trigger part, one energy layer with kernel 21, latency 62;
//   * the dilated trigger example (10x k3, then 1x k2 with dilation 2) with the
//     piecewise linear sigmoid in front of the 4-Conv energy part, latency 53.
// Together they exercise coefficient loading and reloading, output holding
// while loading, invalid samples, ReLU clipping, sigmoid saturation, the
// concatenation delay, paired and odd DSP paths, odd and even kernels,
// dilation and both sigmoid implementations.
module tb_cnn_energy_top;
  import cnn_pkg::*;
  logic clk = 0;
  always #5 clk = ~clk;

  localparam int N = 3;
  int   ch [N];
  int   fl [N];
  logic dn [N];
  int   checks, failures;

  tb_net_check #(.NAME("4-Conv")) c0 (.clk, .checks(ch[0]), .failures(fl[0]), .done(dn[0]));
  tb_net_check #(.E_NL(1), .E_KS('{0: 21, default: 1}), .E_FMS('{default: 1}), .EXP_LAT(62),
                 .NAME("3-Conv"))
    c1 (.clk, .checks(ch[1]), .failures(fl[1]), .done(dn[1]));
  tb_net_check #(.T_KS('{0: 3, 1: 2, default: 1}), .T_DS('{0: 1, 1: 2, default: 1}),
                 .T_FMS('{0: 10, 1: 1, default: 1}), .SIG_ACT(ACT_SIGMOID_PLAN), .EXP_LAT(53),
                 .NAME("dilated trigger + PLAN"))
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
