// conv_layer -- one causal 1-D convolutional layer: a shared sample buffer and
// FM feature maps working on the same input channels.
//
// Every clock cycle the layer takes one sample per input channel on `din` and
// produces one value per feature map on `dout`, LAT = 11 + (K mod 2) +
// (K-1 if D = 1) cycles later. The sample buffer holds D*(K-1)+1 samples per
// channel so that a dilation D can be served; each feature map reads the taps
// it needs. The coefficient shift chain runs through the feature maps in
// order: `coef_in` enters feature map 0, and the last feature map drives
// `coef_out`. Holding one buffer per layer instead of one per neuron is this
// design's choice; the feature maps see the same samples either way.
module conv_layer
  import cnn_pkg::*;
#(
  parameter int   CIN = 1,
  parameter int   FM  = 5,
  parameter int   K   = 3,
  parameter int   D   = 1,
  parameter act_e ACT = ACT_SIGMOID_LUT
) (
  input  logic  clk,
  input  logic  rst,
  input  logic  en,
  input  data_t din  [CIN],
  input  logic  coef_shift,
  input  coef_t coef_in,
  output coef_t coef_out,
  output data_t dout [FM]
);

  localparam int DEPTH = buffer_depth(K, D);

  data_t taps [CIN][DEPTH];
  coef_t cchain [FM+1];

  sample_buffer #(.CIN(CIN), .DEPTH(DEPTH)) u_buf (
    .clk, .rst, .din, .taps
  );

  assign cchain[0] = coef_in;
  for (genvar f = 0; f < FM; f++) begin : g_fm
    feature_map #(.CIN(CIN), .K(K), .D(D), .ACT(ACT), .DEPTH(DEPTH)) u_fm (
      .clk, .rst, .en,
      .taps,
      .coef_shift,
      .coef_in (cchain[f]),
      .coef_out(cchain[f+1]),
      .y       (dout[f])
    );
  end
  assign coef_out = cchain[FM];

endmodule
