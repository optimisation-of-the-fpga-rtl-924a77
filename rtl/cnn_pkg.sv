// cnn_pkg -- shared number formats, activation selector and layer arithmetic
// for the pipelined convolutional-network datapath.
//
// All streamed values are signed fixed-point numbers of DATA_W = 18 bits with
// DATA_FRAC = 10 fractional bits; coefficients (weights and biases) use the same
// format. A product therefore carries 2*DATA_FRAC = 20 fractional bits and is
// accumulated in ACC_W = 44 bits, the width of a DSP cascade chain. The 18-bit
// width and the 10 fractional bits follow the reference design; the coefficient
// format and the accumulator width are this design's choice.
//
// The functions below work out, at elaboration time, how the multiplications of
// one feature map are spread over dual-multiplier DSP slices and how many clock
// cycles a layer takes, so that every module and testbench uses one formula.
package cnn_pkg;

  localparam int DATA_W    = 18;
  localparam int DATA_FRAC = 10;
  localparam int COEF_W    = 18;
  localparam int ACC_W     = 44;
  localparam int PROD_FRAC = 2 * DATA_FRAC;

  // Largest number of layers in one stack; per-layer parameters are arrays of
  // this length, of which the first NL entries are used.
  localparam int MAXL = 8;

  typedef logic signed [DATA_W-1:0] data_t;
  typedef logic signed [COEF_W-1:0] coef_t;
  typedef logic signed [ACC_W-1:0]  acc_t;

  // Activation applied at the end of a feature map.
  typedef enum logic [1:0] {
    ACT_SIGMOID_LUT  = 2'd0,   // tabulated sigmoid
    ACT_SIGMOID_PLAN = 2'd1,   // piecewise linear sigmoid (shifts and adds)
    ACT_RELU         = 2'd2,   // rectified linear unit
    ACT_NONE         = 2'd3    // linear (rescale and saturate only)
  } act_e;

  // Cycles from the DSP data inputs to its result, and from chainin to result.
  localparam int DSP_DATA_LAT  = 4;
  localparam int DSP_CHAIN_LAT = 2;

  // Fixed stages of a feature map outside the DSP chains: sample-buffer input
  // register, sum of paths with bias, sum over paths, activation, output register.
  localparam int FM_FIXED_LAT = 5;

  // Latency of one layer in clock cycles: 11 + (k mod 2) + (k-1 if d = 1).
  function automatic int layer_latency(input int k, input int d);
    return 11 + (k % 2) + ((d == 1) ? (k - 1) : 0);
  endfunction

  // Buffer depth needed for kernel k and dilation d: d*(k-1)+1.
  function automatic int buffer_depth(input int k, input int d);
    return d * (k - 1) + 1;
  endfunction

  // Number of DSP slices in one feature map with cin input channels.
  function automatic int fm_dsps(input int k, input int cin);
    return (cin / 2) * k + (cin % 2) * ((k + 1) / 2);
  endfunction

  // ---- paired path: DSP m of a chain takes tap k-1-m of two channels ----
  // Tap j of the buffer holds x[t - j*d]. A DSP at chain position m sees its
  // data 2*m cycles after the chain start; it must read the buffer element
  // s + 2*m + j*d, where s is chosen so the smallest index used is zero.
  function automatic int pair_start(input int k, input int d);
    int mn;
    mn = 1 << 30;
    for (int m = 0; m < k; m++)
      if (2 * m + (k - 1 - m) * d < mn) mn = 2 * m + (k - 1 - m) * d;
    return mn;   // the chain starts mn cycles before the newest sample is read
  endfunction

  function automatic int pair_index(input int k, input int d, input int m);
    return 2 * m + (k - 1 - m) * d - pair_start(k, d);
  endfunction

  // Cycles from the newest sample entering the buffer to the end of the chain.
  function automatic int pair_path_lat(input int k, input int d);
    return -pair_start(k, d) + DSP_DATA_LAT + DSP_CHAIN_LAT * (k - 1);
  endfunction

  // ---- odd path: DSP m takes taps k-1-2m and k-2-2m of the last channel ----
  function automatic int odd_dsps(input int k);
    return (k + 1) / 2;
  endfunction

  // Tap handled by multiplier u (0 or 1) of DSP m, or -1 when it is unused.
  function automatic int odd_tap(input int k, input int m, input int u);
    int j;
    j = k - 1 - 2 * m - u;
    return (j >= 0) ? j : -1;
  endfunction

  function automatic int odd_start(input int k, input int d);
    int mn;
    mn = 1 << 30;
    for (int m = 0; m < (k + 1) / 2; m++)
      for (int u = 0; u < 2; u++)
        if (odd_tap(k, m, u) >= 0 && 2 * m + odd_tap(k, m, u) * d < mn)
          mn = 2 * m + odd_tap(k, m, u) * d;
    return mn;
  endfunction

  function automatic int odd_index(input int k, input int d, input int m, input int u);
    return 2 * m + odd_tap(k, m, u) * d - odd_start(k, d);
  endfunction

  function automatic int odd_path_lat(input int k, input int d);
    return -odd_start(k, d) + DSP_DATA_LAT + DSP_CHAIN_LAT * ((k + 1) / 2 - 1);
  endfunction

  // Cycles left for the alignment delay of a path once the fixed stages and the
  // chain itself are accounted for.
  function automatic int path_pad(input int k, input int d, input int path_lat);
    return layer_latency(k, d) - FM_FIXED_LAT - path_lat;
  endfunction

endpackage
