// tb_layer_check -- stimulus and checker for one conv_layer configuration,
// used by tb_conv_layer. Random coefficients are shifted through the layer's
// coefficient chain (feature map 0 nearest the input), random samples are
// streamed in, and every feature-map output is compared with the direct
// convolution of tb_cnn_ref at the exact layer latency.
module tb_layer_check
  import cnn_pkg::*;
  import tb_cnn_ref::*;
#(
  parameter int   CIN = 1,
  parameter int   FM  = 5,
  parameter int   K   = 3,
  parameter int   D   = 1,
  parameter act_e ACT = ACT_SIGMOID_LUT,
  parameter int   T   = 200
) (
  input  logic clk,
  output int   checks,
  output int   failures,
  output logic done
);
  localparam int NC  = FM * (1 + CIN * K);
  localparam int LAT = 11 + (K % 2) + ((D == 1) ? K - 1 : 0);

  logic  rst, en, coef_shift;
  coef_t coef_in, coef_out;
  data_t din [CIN];
  data_t dout [FM];

  conv_layer #(.CIN(CIN), .FM(FM), .K(K), .D(D), .ACT(ACT)) dut (
    .clk, .rst, .en, .din, .coef_shift, .coef_in, .coef_out, .dout
  );

  int coefs[];
  int x[];
  int yref[];

  initial begin
    int nneg;
    checks = 0; failures = 0; done = 0;
    coefs = new[NC];
    x = new[CIN * T];
    for (int i = 0; i < NC; i++) coefs[i] = int'($urandom_range(0, 1200)) - 600;
    for (int i = 0; i < CIN * T; i++) x[i] = int'($urandom_range(0, 6000)) - 3000;
    nneg = layer_ref(CIN, FM, K, D, int'(ACT), T, x, coefs, 0, yref);

    rst = 1; en = 0; coef_shift = 0; coef_in = '0;
    for (int c = 0; c < CIN; c++) din[c] = '0;
    @(negedge clk);
    @(negedge clk);
    rst = 0;
    for (int s = 0; s < NC; s++) begin
      coef_shift = 1;
      coef_in = coef_t'(coefs[NC-1-s]);
      @(negedge clk);
    end
    coef_shift = 0;
    repeat (LAT + 4) @(negedge clk);
    en = 1;
    for (int n = 0; n < T + LAT; n++) begin
      if (n >= LAT && n - LAT >= D * (K - 1)) begin
        for (int f = 0; f < FM; f++) begin
          checks++;
          if (int'(dout[f]) != yref[f * T + n - LAT]) begin
            failures++;
            if (failures < 4)
              $display("layer FM=%0d K=%0d: fm %0d t=%0d got %0d want %0d", FM, K, f, n - LAT, dout[f], yref[f * T + n - LAT]);
          end
        end
      end
      for (int c = 0; c < CIN; c++) din[c] = (n < T) ? data_t'(x[c * T + n]) : '0;
      @(negedge clk);
    end
    done = 1;
  end
endmodule
