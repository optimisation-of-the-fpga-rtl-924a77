// tb_sigmoid_plan -- checks the piecewise linear sigmoid: exact values from the
// segment definition, symmetry f(x) + f(-x) = 1 away from zero, distance to the
// true sigmoid below 0.025, and the one-cycle latency.
module tb_sigmoid_plan;
  import cnn_pkg::*;
  import tb_cnn_ref::*;
  logic clk = 0;
  always #5 clk = ~clk;

  acc_t  acc;
  data_t y;
  int checks = 0, failures = 0;

  sigmoid_plan dut (.clk, .acc, .y);

  task automatic apply(input longint s, output int got);
    @(negedge clk);
    acc = acc_t'(s);
    @(negedge clk);
    got = int'(y);
    checks++;
    if (got != sig_plan(s)) begin
      failures++;
      if (failures < 5) $display("sum %0d: got %0d want %0d", s, got, sig_plan(s));
    end
  endtask

  initial begin
    int yp, yn;
    for (int i = 0; i < 1500; i++) begin
      longint s;
      real x, ref_sig;
      s = (longint'($urandom_range(1, 1 << 23)) << 1) ;   // 0 .. 16 at 20 frac bits
      if (i == 0) s = longint'(5) << 20;
      if (i == 1) s = (longint'(19) << 20) / 8;
      if (i == 2) s = longint'(1) << 20;
      apply(s, yp);
      apply(-s, yn);
      // symmetry holds exactly when s is a multiple of 2^10
      if (s % 1024 == 0) begin
        checks++;
        if (yp + yn != 1024) failures++;
      end
      x = real'(s) / real'(1 << 20);
      ref_sig = 1.0 / (1.0 + $exp(-x));
      checks++;
      if ((real'(yp) / 1024.0 - ref_sig) > 0.025 || (ref_sig - real'(yp) / 1024.0) > 0.025)
        failures++;
    end
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
