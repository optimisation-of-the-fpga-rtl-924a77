// tb_delay_chain -- checks that the delay line returns its input exactly DELAY
// cycles later, for DELAY = 7 and for the zero-length case.
module tb_delay_chain;
  logic clk = 0;
  always #5 clk = ~clk;

  logic [17:0] din, d7, d0;
  int checks = 0, failures = 0;
  logic [17:0] hist [int];

  delay_chain #(.W(18), .DELAY(7)) dut7 (.clk, .din, .dout(d7));
  delay_chain #(.W(18), .DELAY(0)) dut0 (.clk, .din, .dout(d0));

  initial begin
    for (int n = 0; n < 200; n++) begin
      @(negedge clk);
      if (n >= 8) begin
        checks++;
        if (d7 !== hist[n-7]) failures++;
      end
      din = 18'($urandom);
      hist[n] = din;
      #1;
      checks++;
      if (d0 !== din) failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
