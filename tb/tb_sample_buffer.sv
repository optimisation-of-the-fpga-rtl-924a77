// tb_sample_buffer -- checks that element i of each channel holds the sample
// that entered i+1 cycles earlier, and that reset clears the input element.
module tb_sample_buffer;
  import cnn_pkg::*;
  logic clk = 0;
  always #5 clk = ~clk;

  localparam int CIN = 3, DEPTH = 7;
  logic  rst;
  data_t din [CIN];
  data_t taps [CIN][DEPTH];
  int checks = 0, failures = 0;
  data_t hist [CIN][int];

  sample_buffer #(.CIN(CIN), .DEPTH(DEPTH)) dut (.clk, .rst, .din, .taps);

  initial begin
    rst = 1;
    for (int c = 0; c < CIN; c++) din[c] = '0;
    @(negedge clk);
    @(negedge clk);
    checks++;
    if (taps[0][0] != 0 || taps[1][0] != 0 || taps[2][0] != 0) failures++;
    rst = 0;
    for (int n = 0; n < 300; n++) begin
      @(negedge clk);
      if (n > DEPTH) begin
        for (int c = 0; c < CIN; c++)
          for (int i = 0; i < DEPTH; i++) begin
            checks++;
            if (taps[c][i] != hist[c][n-1-i]) failures++;
          end
      end
      for (int c = 0; c < CIN; c++) begin
        din[c] = data_t'($urandom);
        hist[c][n] = din[c];
      end
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
