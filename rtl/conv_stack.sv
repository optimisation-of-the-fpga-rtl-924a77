// conv_stack -- a chain of convolutional layers, each feeding the next.
//
// Layer l has FMS[l] feature maps, kernel size KS[l], dilation DS[l] and
// activation ACTS[l] (entries from NL on are unused); its input channels are the CIN0 stream inputs for layer
// 0 and the feature maps of layer l-1 otherwise. The stream advances one
// sample per clock cycle; `dout` is the output of the last layer, LAT cycles
// after the input, where LAT is the sum of the layer latencies. The coefficient
// shift chain passes through layer 0 first and leaves the last layer on
// `coef_out`. Building the network from per-layer feature-map instances with a
// generate loop follows the reference design; the parameter arrays are this
// design's way of configuring it.
module conv_stack
  import cnn_pkg::*;
#(
  parameter int   NL        = 2,
  parameter int   CIN0      = 1,
  parameter int   MAXC      = 16,
  parameter int   KS   [MAXL] = '{0: 3, 1: 6, default: 1},
  parameter int   DS   [MAXL] = '{default: 1},
  parameter int   FMS  [MAXL] = '{0: 5, 1: 1, default: 1},
  parameter act_e ACTS [MAXL] = '{default: ACT_SIGMOID_LUT},
  parameter int   FOUT      = FMS[NL-1]
) (
  input  logic  clk,
  input  logic  rst,
  input  logic  en,
  input  data_t din  [CIN0],
  input  logic  coef_shift,
  input  coef_t coef_in,
  output coef_t coef_out,
  output data_t dout [FOUT]
);

  data_t bus [NL+1][MAXC];
  coef_t cchain [NL+1];

  for (genvar c = 0; c < MAXC; c++) begin : g_in
    if (c < CIN0) begin : g_used
      assign bus[0][c] = din[c];
    end else begin : g_unused
      assign bus[0][c] = '0;
    end
  end

  assign cchain[0] = coef_in;

  for (genvar l = 0; l < NL; l++) begin : g_layer
    localparam int CIN = (l == 0) ? CIN0 : FMS[(l == 0) ? 0 : l-1];
    localparam int FM  = FMS[l];
    data_t lin  [CIN];
    data_t lout [FM];
    if (CIN > MAXC || FM > MAXC) begin : g_bad
      $error("conv_stack: MAXC too small");
    end
    for (genvar c = 0; c < CIN; c++) begin : g_lin
      assign lin[c] = bus[l][c];
    end
    conv_layer #(.CIN(CIN), .FM(FM), .K(KS[l]), .D(DS[l]), .ACT(ACTS[l])) u_layer (
      .clk, .rst, .en,
      .din       (lin),
      .coef_shift,
      .coef_in   (cchain[l]),
      .coef_out  (cchain[l+1]),
      .dout      (lout)
    );
    for (genvar c = 0; c < MAXC; c++) begin : g_out
      if (c < FM) begin : g_used
        assign bus[l+1][c] = lout[c];
      end else begin : g_unused
        assign bus[l+1][c] = '0;
      end
    end
  end

  for (genvar c = 0; c < FOUT; c++) begin : g_dout
    assign dout[c] = bus[NL][c];
  end
  assign coef_out = cchain[NL];

endmodule
