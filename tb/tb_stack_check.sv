// tb_stack_check -- stimulus and checker for one conv_stack configuration,
// used by tb_conv_stack. Coefficients for all layers are shifted through the
// stack's chain (layer 0 nearest the input), a pulse-like random sample stream
// is applied, and the last layer's outputs are compared with a layer-by-layer
// direct convolution at the sum of the layer latencies.
module tb_stack_check
  import cnn_pkg::*;
  import tb_cnn_ref::*;
#(
  parameter int   NL        = 2,
  parameter int   KS   [MAXL] = '{0: 3, 1: 6, default: 1},
  parameter int   DS   [MAXL] = '{default: 1},
  parameter int   FMS  [MAXL] = '{0: 5, 1: 1, default: 1},
  parameter act_e ACTS [MAXL] = '{default: ACT_SIGMOID_LUT},
  parameter int   T         = 300
) (
  input  logic clk,
  output int   checks,
  output int   failures,
  output logic done
);
  localparam int FOUT = FMS[NL-1];

  function automatic int tot_lat();
    int s = 0;
    for (int l = 0; l < NL; l++) s += 11 + (KS[l] % 2) + ((DS[l] == 1) ? KS[l] - 1 : 0);
    return s;
  endfunction
  function automatic int tot_coef();
    int s = 0, cin = 1;
    for (int l = 0; l < NL; l++) begin s += FMS[l] * (1 + cin * KS[l]); cin = FMS[l]; end
    return s;
  endfunction
  function automatic int rf();
    int s = 0;
    for (int l = 0; l < NL; l++) s += DS[l] * (KS[l] - 1);
    return s;
  endfunction
  localparam int LAT = tot_lat();
  localparam int NC  = tot_coef();

  logic  rst, en, coef_shift;
  coef_t coef_in, coef_out;
  data_t din [1];
  data_t dout [FOUT];

  conv_stack #(.NL(NL), .CIN0(1), .KS(KS), .DS(DS), .FMS(FMS), .ACTS(ACTS)) dut (
    .clk, .rst, .en, .din, .coef_shift, .coef_in, .coef_out, .dout
  );

  int coefs[];
  int x[];
  int a[];
  int b[];

  initial begin
    int off, cin, nneg;
    checks = 0; failures = 0; done = 0;
    coefs = new[NC];
    x = new[T];
    for (int i = 0; i < NC; i++) coefs[i] = int'($urandom_range(0, 1600)) - 800;
    for (int t = 0; t < T; t++) x[t] = int'($urandom_range(0, 400)) - 200 + ((t % 23 == 5) ? 4000 : 0);
    a = x;
    off = 0; cin = 1;
    for (int l = 0; l < NL; l++) begin
      nneg = layer_ref(cin, FMS[l], KS[l], DS[l], int'(ACTS[l]), T, a, coefs, off, b);
      off += FMS[l] * (1 + cin * KS[l]);
      cin = FMS[l];
      a = b;
    end

    rst = 1; en = 0; coef_shift = 0; coef_in = '0; din[0] = '0;
    @(negedge clk);
    @(negedge clk);
    rst = 0;
    for (int s = 0; s < NC; s++) begin
      coef_shift = 1;
      coef_in = coef_t'(coefs[NC-1-s]);
      @(negedge clk);
    end
    coef_shift = 0;
    en = 1;
    repeat (LAT + 4) @(negedge clk);
    for (int n = 0; n < T + LAT; n++) begin
      if (n >= LAT && n - LAT >= rf()) begin
        for (int f = 0; f < FOUT; f++) begin
          checks++;
          if (int'(dout[f]) != a[f * T + n - LAT]) begin
            failures++;
            if (failures < 4) $display("stack NL=%0d: t=%0d got %0d want %0d", NL, n - LAT, dout[f], a[f * T + n - LAT]);
          end
        end
      end
      din[0] = (n < T) ? data_t'(x[n]) : '0;
      @(negedge clk);
    end
    done = 1;
  end
endmodule
