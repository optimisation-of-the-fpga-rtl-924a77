// tb_sigmoid_lut -- checks the tabulated sigmoid against 1/(1+exp(-x)) with
// the same input quantisation (1/32 steps, clamped to [-8, 8)), for random
// sums, sums beyond the table range and values at the boundaries. Also checks
// the one-cycle latency.
module tb_sigmoid_lut;
  import cnn_pkg::*;
  import tb_cnn_ref::*;
  logic clk = 0;
  always #5 clk = ~clk;

  acc_t  acc;
  data_t y;
  int checks = 0, failures = 0;
  int    expq;

  sigmoid_lut dut (.clk, .acc, .y);

  task automatic apply(input longint s);
    @(negedge clk);
    acc  = acc_t'(s);
    expq = sig_lut(s);
    @(negedge clk);
    checks++;
    if (int'(y) != expq) begin
      failures++;
      if (failures < 5) $display("sum %0d: got %0d want %0d", s, y, expq);
    end
  endtask

  initial begin
    apply(0);
    apply(longint'(8) << 20);
    apply(-(longint'(8) << 20));
    apply(longint'(1) << 40);
    apply(-(longint'(1) << 40));
    apply(-1);
    for (int i = 0; i < 2000; i++)
      apply(longint'($urandom_range(0, 1 << 25)) - (longint'(1) << 24));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
