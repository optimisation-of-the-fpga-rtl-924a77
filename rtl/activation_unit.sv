// activation_unit -- activation stage at the end of a feature map.
//
// Takes the full-precision neuron sum (ACC_W bits, 2*DATA_FRAC fractional bits)
// and returns the activated value in the stream format (DATA_W bits, DATA_FRAC
// fractional bits), one cycle later for every choice of ACT:
//   ACT_SIGMOID_LUT   table look-up (sigmoid_lut), used by the trigger layers;
//   ACT_SIGMOID_PLAN  shift-and-add approximation (sigmoid_plan);
//   ACT_RELU          max(0, x), used by the energy-reconstruction layers;
//   ACT_NONE          x.
// The rescaling truncates toward minus infinity. ReLU and linear outputs
// saturate at the largest 18-bit value rather than wrap; this saturation is
// this design's choice (the reference design removed its overflow checks).
module activation_unit
  import cnn_pkg::*;
#(
  parameter act_e ACT = ACT_RELU
) (
  input  logic  clk,
  input  acc_t  acc,
  output data_t y
);

  localparam acc_t DMAX = acc_t'(2**(DATA_W-1) - 1);
  localparam acc_t DMIN = -acc_t'(2**(DATA_W-1));

  if (ACT == ACT_SIGMOID_LUT) begin : g_lut
    sigmoid_lut u_sig (.clk, .acc, .y);
  end else if (ACT == ACT_SIGMOID_PLAN) begin : g_plan
    sigmoid_plan u_sig (.clk, .acc, .y);
  end else begin : g_lin
    acc_t  scaled;
    data_t r;
    always_comb begin
      scaled = acc >>> DATA_FRAC;
      if (scaled > DMAX)                          r = data_t'(DMAX);
      else if (ACT == ACT_RELU && scaled < 0)     r = '0;
      else if (scaled < DMIN)                     r = data_t'(DMIN);
      else                                        r = data_t'(scaled);
    end
    always_ff @(posedge clk) y <= r;
  end

endmodule
