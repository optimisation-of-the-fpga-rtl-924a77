// feature_map -- one feature map (neuron) of a causal 1-D convolutional layer,
// computed by cascaded dual-multiplier DSP slices.
//
// y[t] = act( b + sum_{c<CIN} sum_{j<K} w[c][j] * x_c[t - j*D] )
//
// How it works. The calculation is pipelined over the input samples: a chain of
// DSP slices starts on the oldest sample of the kernel window, and each slice
// adds its products to the partial sum handed down the cascade, so that after
// the newest sample only one multiply-add remains. Two ways of filling a slice
// are used:
//   * paired path -- input channels are taken two at a time; slice m of the
//     chain multiplies tap K-1-m of both channels. A chain has K slices and
//     there is one chain per channel pair.
//   * odd path -- present only when CIN is odd; the last channel gets its own
//     chain in which slice m multiplies two consecutive taps (K-1-2m, K-2-2m)
//     of that channel. It has ceil(K/2) slices; for odd K the second
//     multiplier of the last slice gets zeros.
// The slices read their operands from the layer's sample buffer at the element
// that holds the right sample in the cycle the slice needs it (see cnn_pkg).
// Each path then passes an alignment delay chain so that all paths end in the
// same cycle. The paired chains are summed together with the bias, the odd path
// is added one stage later, the activation is applied and the result is
// registered at the output.
//
// Timing. With `taps` fed by a sample buffer whose input sees x[t] in cycle t,
// y[t] appears on `y` in cycle t + 11 + (K mod 2) + (K-1 if D = 1), the layer
// latency of the reference design; the alignment delays are sized so that this
// holds for every CIN, K and D.
//
// Coefficients. NCOEF = 1 + CIN*K registers, shifted in serially: while
// `coef_shift` is high every register takes its neighbour's value, register 0
// takes `coef_in` and the last one drives `coef_out` for the next feature map.
// Register 0 is the bias; register 1 + c*K + j is w[c][j] (tap j = sample j*D
// cycles old). The coefficient registers have no reset.
//
// Control. `en` (calculation mode) only gates the output register; `rst` only
// clears it. Reference design: the two calculation paths, slice assignment,
// delay chains, summation order and latency formula. This design's choice: the
// coefficient shift chain and the exact split of the fixed latency into stages.
module feature_map
  import cnn_pkg::*;
#(
  parameter int   CIN   = 1,
  parameter int   K     = 3,
  parameter int   D     = 1,
  parameter act_e ACT   = ACT_SIGMOID_LUT,
  parameter int   DEPTH = buffer_depth(K, D)
) (
  input  logic  clk,
  input  logic  rst,
  input  logic  en,
  input  data_t taps [CIN][DEPTH],
  input  logic  coef_shift,
  input  coef_t coef_in,
  output coef_t coef_out,
  output data_t y
);

  localparam int NCOEF    = 1 + CIN * K;
  localparam int NPAIR    = CIN / 2;
  localparam bit HAS_ODD  = (CIN % 2) == 1;
  localparam int NODD     = odd_dsps(K);
  localparam int PAD_PAIR = path_pad(K, D, pair_path_lat(K, D));
  localparam int PAD_ODD  = path_pad(K, D, odd_path_lat(K, D));

  if (PAD_PAIR < 0 || PAD_ODD < 0) begin : g_bad_lat
    $error("feature_map: calculation paths longer than the layer latency");
  end
  if (DEPTH < buffer_depth(K, D)) begin : g_bad_depth
    $error("feature_map: sample buffer too short for K and D");
  end

  // ---------------- coefficient registers ----------------
  coef_t coef [NCOEF];

  always_ff @(posedge clk) begin
    if (coef_shift) begin
      coef[0] <= coef_in;
      for (int i = 1; i < NCOEF; i++) coef[i] <= coef[i-1];
    end
  end
  assign coef_out = coef[NCOEF-1];

  function automatic int widx(input int c, input int j);
    return 1 + c * K + j;
  endfunction

  // ---------------- paired paths ----------------
  acc_t pair_sum_d [NPAIR > 0 ? NPAIR : 1];

  for (genvar p = 0; p < NPAIR; p++) begin : g_pair
    acc_t chain [K+1];
    assign chain[0] = '0;
    for (genvar m = 0; m < K; m++) begin : g_dsp
      localparam int IDX = pair_index(K, D, m);
      localparam int TAP = K - 1 - m;
      dsp_systolic u_dsp (
        .clk,
        .a0      (taps[2*p][IDX]),
        .b0      (coef[widx(2*p, TAP)]),
        .a1      (taps[2*p+1][IDX]),
        .b1      (coef[widx(2*p+1, TAP)]),
        .chainin (chain[m]),
        .chainout(chain[m+1])
      );
    end
    delay_chain #(.W(ACC_W), .DELAY(PAD_PAIR)) u_align (
      .clk, .din(chain[K]), .dout(pair_sum_d[p])
    );
  end
  if (NPAIR == 0) begin : g_no_pair
    assign pair_sum_d[0] = '0;
  end

  // ---------------- odd path (last channel, consecutive taps) ----------------
  acc_t odd_sum_d;

  if (HAS_ODD) begin : g_odd
    localparam int C = CIN - 1;
    acc_t chain [NODD+1];
    assign chain[0] = '0;
    for (genvar m = 0; m < NODD; m++) begin : g_dsp
      localparam int  TAP0 = odd_tap(K, m, 0);
      localparam int  TAP1 = odd_tap(K, m, 1);
      localparam int  IDX0 = odd_index(K, D, m, 0);
      localparam bit  USE1 = TAP1 >= 0;
      localparam int  IDX1 = USE1 ? odd_index(K, D, m, 1) : 0;
      data_t a1;
      coef_t b1;
      assign a1 = USE1 ? taps[C][IDX1] : '0;
      assign b1 = USE1 ? coef[widx(C, USE1 ? TAP1 : 0)] : '0;
      dsp_systolic u_dsp (
        .clk,
        .a0      (taps[C][IDX0]),
        .b0      (coef[widx(C, TAP0)]),
        .a1      (a1),
        .b1      (b1),
        .chainin (chain[m]),
        .chainout(chain[m+1])
      );
    end
    delay_chain #(.W(ACC_W), .DELAY(PAD_ODD)) u_align (
      .clk, .din(chain[NODD]), .dout(odd_sum_d)
    );
  end else begin : g_no_odd
    assign odd_sum_d = '0;
  end

  // ---------------- summation, activation, output ----------------
  acc_t sum_bias_q;   // paired paths + bias
  acc_t odd_q;        // odd path, kept in step with sum_bias_q
  acc_t sum_all_q;    // sum over paths
  data_t act_y;

  always_ff @(posedge clk) begin
    acc_t s;
    s = acc_t'(coef[0]) <<< DATA_FRAC;
    for (int p = 0; p < NPAIR; p++) s += pair_sum_d[p];
    sum_bias_q <= s;
    odd_q      <= odd_sum_d;
    sum_all_q  <= sum_bias_q + odd_q;
  end

  activation_unit #(.ACT(ACT)) u_act (.clk, .acc(sum_all_q), .y(act_y));

  always_ff @(posedge clk) begin
    if (rst)     y <= '0;
    else if (en) y <= act_y;
  end

endmodule
