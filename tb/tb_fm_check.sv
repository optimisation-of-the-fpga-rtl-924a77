// tb_fm_check -- stimulus and checker for one feature_map configuration, used
// by tb_feature_map. It shifts random coefficients in, streams random samples
// through a sample buffer into the feature map and compares every output with
// the direct convolution of tb_cnn_ref, LAT = 11 + (K mod 2) + (K-1 if D = 1)
// cycles after the sample entered. It then drops `en` and checks that the
// output holds. `done` rises when finished.
module tb_fm_check
  import cnn_pkg::*;
  import tb_cnn_ref::*;
#(
  parameter int   CIN = 1,
  parameter int   K   = 3,
  parameter int   D   = 1,
  parameter act_e ACT = ACT_NONE,
  parameter int   T   = 200
) (
  input  logic clk,
  output int   checks,
  output int   failures,
  output logic done
);
  localparam int DEPTH = D * (K - 1) + 1;
  localparam int NC    = 1 + CIN * K;
  localparam int LAT   = 11 + (K % 2) + ((D == 1) ? K - 1 : 0);

  logic  rst, en, coef_shift;
  coef_t coef_in, coef_out;
  data_t din [CIN];
  data_t taps [CIN][DEPTH];
  data_t y;

  sample_buffer #(.CIN(CIN), .DEPTH(DEPTH)) u_buf (.clk, .rst, .din, .taps);
  feature_map #(.CIN(CIN), .K(K), .D(D), .ACT(ACT)) dut (
    .clk, .rst, .en, .taps, .coef_shift, .coef_in, .coef_out, .y
  );

  int coefs[];
  int x[];
  int yref[];

  initial begin
    int nneg;
    data_t held;
    checks = 0; failures = 0; done = 0;
    coefs = new[NC];
    x = new[CIN * T];
    for (int i = 0; i < NC; i++) coefs[i] = int'($urandom_range(0, 1200)) - 600;
    coefs[0] = int'($urandom_range(0, 4000)) - 2000;
    for (int i = 0; i < CIN * T; i++) x[i] = int'($urandom_range(0, 6000)) - 3000;
    nneg = layer_ref(CIN, 1, K, D, int'(ACT), T, x, coefs, 0, yref);

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
    // the last coefficient register now holds the first word pushed
    checks++;
    if (int'(coef_out) != coefs[NC-1]) failures++;
    repeat (LAT + 4) @(negedge clk);     // flush zeros through the pipeline
    en = 1;
    for (int n = 0; n < T + LAT; n++) begin
      if (n >= LAT && n - LAT >= D * (K - 1)) begin
        checks++;
        if (int'(y) != yref[n - LAT]) begin
          failures++;
          if (failures < 4)
            $display("fm CIN=%0d K=%0d D=%0d: t=%0d got %0d want %0d", CIN, K, D, n - LAT, y, yref[n - LAT]);
        end
      end
      for (int c = 0; c < CIN; c++) din[c] = (n < T) ? data_t'(x[c * T + n]) : '0;
      @(negedge clk);
    end
    en = 0;
    held = y;
    for (int i = 0; i < 10; i++) begin
      for (int c = 0; c < CIN; c++) din[c] = data_t'($urandom);
      @(negedge clk);
      checks++;
      if (y != held) failures++;
    end
    done = 1;
  end
endmodule
